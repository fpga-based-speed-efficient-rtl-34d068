// tb_round_sat: random pairs of full-precision results, plus pairs near the
// rounding and saturation boundaries. Expected output: floor((a+b+2^14)/2^15)
// clipped to [-32768, 32767], one clock after in_valid.
module tb_round_sat;
  localparam int IW = 38, FRAC = 15;
  int checks = 0, failures = 0, sats = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [IW-1:0] a = '0, b = '0;
  logic out_valid, saturated;
  logic signed [15:0] out_data;

  round_sat #(.IN_W(IW), .FRAC(FRAC), .OUT_W(16)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      longint s, r, e;
      logic es;
      @(negedge clk);
      in_valid = 1;
      case (i % 4)
        0: begin a = IW'({$urandom, $urandom}) >>> 4; b = IW'({$urandom, $urandom}) >>> 4; end
        1: begin a = IW'({$urandom, $urandom}) >>> 7; b = IW'($signed($urandom)) >>> 10; end
        2: begin a = IW'(longint'($signed(16'($urandom))) <<< FRAC); b = IW'(int'($urandom % 5) - 2) <<< (FRAC-1); end
        default: begin a = IW'(32767 + int'($urandom % 3)) <<< FRAC; b = IW'($signed(18'($urandom))); end
      endcase
      s = longint'(a) + longint'(b) + (64'sd1 <<< (FRAC-1));
      r = s >>> FRAC;
      es = 0;
      e = r;
      if (r > 32767) begin e = 32767; es = 1; end
      if (r < -32768) begin e = -32768; es = 1; end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || longint'(out_data) != e || saturated != es) begin
        failures++;
        $display("a=%0d b=%0d: got %0d/%0b/%0b expected %0d/%0b", a, b, out_data, saturated, out_valid, e, es);
      end
      if (es) sats++;
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    checks++;
    if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
