// Self-checking testbench of i2cconv_2in.
//
// Two I2C master models (main and aux) each have their own wired-AND SDA line;
// three DIALOG models (0x30..0x32) sit on the LVDS lanes. With in_sel = 0 the
// main master writes and reads frames while the aux master's line must stay
// untouched; then in_sel = 1 and the aux master does the same, and the main
// line must stay untouched. Data are checked through the bus and in the slave
// registers. A frame issued by the unselected master must go unanswered.
`timescale 1ns/1ps
module tb_i2cconv_2in;

  localparam realtime TCLK = 20ns;
  localparam int      NDEV = 3;

  logic clk = 1'b0, rst_n = 1'b0, in_sel = 1'b0;
  always #(TCLK / 2) clk = !clk;

  logic scl_m, drv_m, line_m, pull_m;
  logic scl_a, drv_a, line_a, pull_a;
  logic sdnx, scnx, sdbn, led;
  logic [NDEV-1:0] drv;

  assign line_m = drv_m && !pull_m;
  assign line_a = drv_a && !pull_a;
  assign sdbn   = &drv;

  i2c_master_model #(.HALF(500ns)) mm (.scl(scl_m), .sda_drv(drv_m), .sda_line(line_m));
  i2c_master_model #(.HALF(500ns)) ma (.scl(scl_a), .sda_drv(drv_a), .sda_line(line_a));

  i2cconv_2in dut (
    .clk(clk), .asynch_res_n(rst_n), .in_sel(in_sel),
    .scl_main(scl_m), .sdain_main(line_m), .sdaout_main(pull_m),
    .scl_aux(scl_a),  .sdain_aux(line_a),  .sdaout_aux(pull_a),
    .sdnx(sdnx), .scnx(scnx), .sdbn(sdbn), .led_comm(led)
  );

  for (genvar i = 0; i < NDEV; i++) begin : g_dev
    dialog_model #(.ADDR(7'h30 + 7'(i))) u_dev (.sc_in(scnx), .sd_in(sdnx), .sd_drv(drv[i]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // pull-downs seen on each master's line, and LED activity
  int unsigned n_pull_m = 0, n_pull_a = 0, n_led = 0;
  always @(negedge clk) begin
    if (pull_m) n_pull_m++;
    if (pull_a) n_pull_a++;
    if (led) n_led++;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] slave_reg(input int d, input int a);
    case (d)
      0:       return g_dev[0].u_dev.mem[a];
      1:       return g_dev[1].u_dev.mem[a];
      default: return g_dev[2].u_dev.mem[a];
    endcase
  endfunction

  task automatic frames(input bit use_aux, input logic [7:0] seed);
    logic [7:0] wr[], rd[];
    bit ok;
    for (int d = 0; d < NDEV; d++) begin
      wr = new[3];
      foreach (wr[i]) wr[i] = seed + 8'(16 * d + i);
      if (use_aux) ma.reg_write(7'h30 + 7'(d), 8'h10, wr, ok);
      else         mm.reg_write(7'h30 + 7'(d), 8'h10, wr, ok);
      check(ok, $sformatf("write dev %0d via %s", d, use_aux ? "aux" : "main"));
      if (use_aux) ma.reg_read(7'h30 + 7'(d), 8'h10, 3, rd, ok);
      else         mm.reg_read(7'h30 + 7'(d), 8'h10, 3, rd, ok);
      check(ok, "read frame");
      for (int i = 0; i < 3; i++) begin
        check(rd[i] == wr[i], $sformatf("byte %0d: %02h exp %02h", i, rd[i], wr[i]));
        check(slave_reg(d, 'h10 + i) == wr[i], "slave register");
      end
    end
  endtask

  initial begin
    logic [7:0] wr[];
    bit ok;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    #7ns;
    // main master selected
    frames(1'b0, 8'h40);
    check(n_pull_m > 0, "main line receives the slaves' bits");
    check(n_pull_a == 0, "aux line untouched while main selected");
    // the unselected aux master gets no answer
    wr = new[1]; wr[0] = 8'h77;
    ma.reg_write(7'h30, 8'h10, wr, ok);
    check(!ok, "unselected master is not answered");
    check(g_dev[0].u_dev.mem[8'h10] == 8'h40, "unselected master did not write");
    // switch to aux
    in_sel = 1'b1;
    n_pull_m = 0;
    frames(1'b1, 8'h80);
    check(n_pull_a > 0, "aux line receives the slaves' bits");
    check(n_pull_m == 0, "main line untouched while aux selected");
    check(n_led > 0, "LED shows activity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
