// tb_polyphase_commutator: random in_valid and even_ready. Checks that
// taken samples alternate even, odd, even, ... starting with even, that
// exactly one of even_load/odd_load marks each taken sample, and that a
// sample due to the even phase waits while that phase is not ready.
module tb_polyphase_commutator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, even_ready = 0;
  logic in_ready, even_load, odd_load, phase;
  logic next_even;
  int stalls = 0, evens = 0, odds = 0;

  polyphase_commutator dut (.*);

  always #5 clk = !clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    next_even = 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = $urandom % 3 != 0;
      even_ready = $urandom % 2 != 0;
      #1;
      checks++;
      if (in_ready != (next_even ? even_ready : 1'b1)) begin
        failures++;
        $display("cycle %0d: in_ready %0b", i, in_ready);
      end
      checks++;
      if (even_load != (in_valid && next_even && even_ready) ||
          odd_load  != (in_valid && !next_even)) begin
        failures++;
        $display("cycle %0d: even_load %0b odd_load %0b", i, even_load, odd_load);
      end
      if (in_valid && !in_ready) stalls++;
      if (even_load) evens++;
      if (odd_load) odds++;
      if (in_valid && in_ready) next_even = !next_even;
    end
    checks++;
    if (stalls == 0 || evens == 0 || odds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
