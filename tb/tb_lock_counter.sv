`timescale 1ps/1fs
// tb_lock_counter: after reset, the feedback clock's first three edges must
// give coarse_ce, fine_ce and load in that order, one each, and tracking
// (with fast_lock low) from then on; a new reset restarts the sequence.
module tb_lock_counter;
  logic clk = 1'b0, rst_n = 1'b1;
  logic coarse_ce, fine_ce, load, fast_lock, tracking;
  int checks = 0, failures = 0;

  lock_counter dut (.clk, .rst_n, .coarse_ce, .fine_ce, .load, .fast_lock, .tracking);

  always #312.5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_step(input int n);
    logic [4:0] exp;
    exp = (n == 0) ? 5'b10010 : (n == 1) ? 5'b01010 : (n == 2) ? 5'b00110 : 5'b00001;
    checks++;
    if ({coarse_ce, fine_ce, load, fast_lock, tracking} !== exp) begin
      failures++;
      $display("FAIL cycle %0d got %b exp %b", n, {coarse_ce, fine_ce, load, fast_lock, tracking}, exp);
    end
  endtask

  initial begin
    #1;
    for (int run = 0; run < 3; run++) begin
      #1 rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      for (int n = 0; n < 10; n++) begin
        expect_step(n);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
