// Long-line endurance workload on one converter channel.
//
// Reproduces, at a reduced count, the acceptance test of the link: one bus of
// six Front-End chips (addresses 0x30..0x35) behind a 26 m cable (each lane
// delayed by 130 ns), SCL at 1 MHz, the same register of each chip written
// and read back over and over with two known bytes used alternately, every
// read checked. NITER rounds per chip are run; the test counts NACKs and data
// errors, which must both be zero, and checks the bus time per write+read
// pair against the frame length (write = 3 bytes, read = 2 + 1 bytes, plus
// START/STOP and the repeated START).
`timescale 1ns/1ps
module tb_wr_endurance;

  localparam realtime TCLK  = 20ns;
  localparam realtime HALF  = 500ns;
  localparam realtime CABLE = 130ns;
  localparam int      NDEV  = 6;
  localparam int      NITER = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(TCLK / 2) clk = !clk;

  logic scl, drv, line, pull, sdnx, scnx, sdbn, led;
  logic sc_far, sd_far, bn_far;
  logic [NDEV-1:0] dd;

  assign line = drv && !pull;
  assign #(CABLE) sc_far = scnx;
  assign #(CABLE) sd_far = sdnx;
  assign bn_far = &dd;
  assign #(CABLE) sdbn = bn_far;

  i2c_master_model #(.HALF(HALF)) m (.scl(scl), .sda_drv(drv), .sda_line(line));

  core_i2cconv_tmr dut (
    .clk(clk), .asynch_res_n(rst_n), .scl(scl), .sda_in(line), .sda_pull(pull),
    .sdnx(sdnx), .sdbn(sdbn), .scnx(scnx), .led_comm(led)
  );

  for (genvar k = 0; k < NDEV; k++) begin : d
    dialog_model #(.ADDR(7'h30 + 7'(k))) u (.sc_in(sc_far), .sd_in(sd_far), .sd_drv(dd[k]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] wr[], rd[];
    bit ok;
    int unsigned errs, nack_frames;
    realtime t0, t1, per_pair;
    errs = 0; nack_frames = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    #7ns;
    for (int k = 0; k < NDEV; k++) begin
      t0 = $realtime;
      for (int i = 0; i < NITER; i++) begin
        wr = new[1];
        wr[0] = i[0] ? 8'h5A : 8'hA5;
        m.reg_write(7'h30 + 7'(k), 8'h07, wr, ok);
        if (!ok) nack_frames++;
        m.reg_read(7'h30 + 7'(k), 8'h07, 1, rd, ok);
        if (!ok) nack_frames++;
        if (rd[0] != wr[0]) errs++;
      end
      t1 = $realtime;
      per_pair = (t1 - t0) / NITER;
      // write: 1 START + 3 bytes x 9 bits + STOP; read: START + 2 x 9 +
      // repeated START + 2 x 9 bits + STOP = 63 SCL periods plus START/STOP
      // overhead of the master model (about 1.5 periods each).
      check(per_pair > 63 * 2 * HALF && per_pair < 70 * 2 * HALF,
            $sformatf("bus time per W&R pair %0.2f us", per_pair / 1us));
      check(d[0].u.n_start > 0, "chips see the frames");
      $display("device 0x%02h: %0d W&R pairs, %0.2f us per pair", 8'h30 + 8'(k), NITER, per_pair / 1us);
    end
    check(m.nacks == 0 && nack_frames == 0, $sformatf("NACK counter %0d", nack_frames));
    check(errs == 0, $sformatf("communication errors %0d", errs));
    check(m.frames == 2 * NITER * NDEV, "all frames issued");
    $display("W&R attempts: %0d  NACK counter: %0d  Comm_err counter: %0d",
             NITER * NDEV, nack_frames, errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
