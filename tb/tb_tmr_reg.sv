// Self-checking testbench of tmr_reg.
//
// Loads random words and checks that q shows each word one clock later; then
// upsets one copy at a time (all bits inverted, between clock edges) and checks
// that q is unaffected and that the next load repairs the copy; then upsets
// two copies of some bits and checks that q follows the 2-of-3 majority
// computed by the testbench. Reset is checked against RESET_VALUE.
`timescale 1ns/1ps
module tb_tmr_reg;

  localparam int unsigned W = 12;
  localparam logic [W-1:0] RV = 12'hA5C;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d, q;
  always #5ns clk = !clk;

  tmr_reg #(.WIDTH(W), .RESET_VALUE(RV)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v, m0, m1;
    d = '0;
    #12ns;
    check(q == RV, "reset value");
    rst_n = 1'b1;
    // plain loads
    for (int i = 0; i < 50; i++) begin
      @(negedge clk) d = W'($urandom);
      v = d;
      @(negedge clk);
      check(q == v, $sformatf("load %03h got %03h", v, q));
    end
    // single-copy upsets are outvoted and repaired on the next load
    for (int i = 0; i < 30; i++) begin
      @(negedge clk) d = W'($urandom);
      v = d;
      @(negedge clk);
      m0 = W'($urandom);
      case (i % 3)
        0: dut.copy0 = dut.copy0 ^ m0;
        1: dut.copy1 = dut.copy1 ^ m0;
        default: dut.copy2 = dut.copy2 ^ m0;
      endcase
      #1ns;
      check(q == v, $sformatf("single upset masked: %03h exp %03h", q, v));
      @(posedge clk) #1ns;
      check(dut.copy0 == v && dut.copy1 == v && dut.copy2 == v, "copies repaired by reload");
    end
    // double upsets: q is the majority of the three copies
    for (int i = 0; i < 30; i++) begin
      @(negedge clk);
      v = q;
      m0 = W'($urandom);
      m1 = W'($urandom);
      dut.copy0 = v ^ m0;
      dut.copy1 = v ^ m1;
      #1ns;
      check(q == (v ^ (m0 & m1)), $sformatf("majority %03h exp %03h", q, v ^ (m0 & m1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
