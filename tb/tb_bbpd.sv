`timescale 1ps/1fs
// tb_bbpd: drives the reference level seen at each feedback edge at random
// and checks that up/dn report it three feedback edges later (sampler,
// retiming flop, output register), and that both stay low when disabled.
module tb_bbpd;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, ref_clk = 1'b0;
  logic up, dn;
  int checks = 0, failures = 0;
  logic [2:0] hist_v = '0, hist_e = '0;

  bbpd dut (.clk, .rst_n, .en, .ref_clk, .up, .dn);

  always #312.5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ups = 0, dns = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      ref_clk = 1'($urandom_range(0, 1));
      en = ($urandom_range(0, 7) != 0);
      @(posedge clk);
      // after this edge the sampler holds ref_clk; the output register now
      // holds the level sampled two edges earlier, gated by en at this
      // edge
      hist_v = {hist_v[1:0], ref_clk};
      hist_e = {hist_e[1:0], en};
      #1;
      if (i >= 3) begin
        logic eu, ed;
        eu = hist_e[0] &  hist_v[2];
        ed = hist_e[0] & ~hist_v[2];
        checks++;
        if (up !== eu || dn !== ed) begin
          failures++;
          $display("FAIL i=%0d up=%0b dn=%0b exp %0b %0b", i, up, dn, eu, ed);
        end
        ups += int'(up); dns += int'(dn);
      end
      @(negedge clk);
    end
    checks++; if (ups == 0 || dns == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
