// Self-checking testbench of core_i2cconv_tmr.
//
// An I2C master model drives the converter's SDA/SCL side; six DIALOG slave
// models (addresses 0x30..0x35) sit on the LVDS lanes, their back-lane
// contributions ANDed as in a daisy chain. The test
//   1. scans addresses 0x2C..0x39 and expects exactly 0x30..0x35 to answer,
//   2. writes and reads back two alternating bytes on each chip,
//   3. writes and reads back frames of 2..16 bytes ("A", "AB", ... "ABCD..P")
//      at register 0x00 and 0x14, checking the data both through the bus and
//      in the slave model's registers,
//   4. checks that a frame to a missing address ends with a NACK and IDLE,
//   5. upsets one copy of the triplicated registers in mid-frame and checks
//      that the frame still succeeds,
//   6. checks the FSM reaction time to an SCL fall (2..3 clk cycles) and that
//      every FSM state and mechanism was reached.
`timescale 1ns/1ps
module tb_core_i2cconv_tmr;
  import i2cconv_pkg::*;

  localparam realtime TCLK = 20ns;   // 50 MHz converter clock
  localparam int      NDEV = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #(TCLK / 2) clk = !clk;

  logic scl, sda_drv, sda_line, sda_pull, sdnx, sdbn, scnx, led_comm;
  logic [NDEV-1:0] drv;

  assign sda_line = sda_drv && !sda_pull;
  assign sdbn     = &drv;

  i2c_master_model #(.HALF(500ns)) m (.scl(scl), .sda_drv(sda_drv), .sda_line(sda_line));

  core_i2cconv_tmr dut (
    .clk(clk), .asynch_res_n(rst_n), .scl(scl), .sda_in(sda_line), .sda_pull(sda_pull),
    .sdnx(sdnx), .sdbn(sdbn), .scnx(scnx), .led_comm(led_comm)
  );

  for (genvar i = 0; i < NDEV; i++) begin : g_dev
    dialog_model #(.ADDR(7'h30 + 7'(i))) u_dev (.sc_in(scnx), .sd_in(sdnx), .sd_drv(drv[i]));
  end

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- coverage of states and mechanisms ---------------------------------
  int unsigned st_seen [8];
  int unsigned n_ack_pass = 0, n_nack_idle = 0, n_rstart = 0, n_upset = 0;
  conv_state_e prev_state = ST_IDLE;
  int unsigned edges_since_fall = 0;
  int unsigned n_lat = 0, n_lat_bad = 0;

  // clk rising edges since the last SCL fall
  always @(posedge clk) edges_since_fall++;
  always @(negedge scl) edges_since_fall = 0;

  // Sampled on the falling clk edge, away from the register updates.
  always @(negedge clk) begin
    for (int i = 0; i < 8; i++) if (dut.r.state == conv_state_e'(8'(1) << i)) st_seen[i]++;
    if (dut.r.state != prev_state) begin
      if (dut.r.state == ST_ACK_SLAVE && prev_state == ST_R_OR_W) begin
        n_lat++;
        if (edges_since_fall != 3) n_lat_bad++;
      end
      if (dut.r.state == ST_IDLE && prev_state == ST_ACK_SLAVE) n_nack_idle++;
      if (dut.r.state == ST_START_INIT && prev_state != ST_IDLE) n_rstart++;
    end
    if (sda_pull) n_ack_pass++;
    prev_state = dut.r.state;
  end

  // SCL is forwarded unchanged; the forward lane follows SDA unless blocked.
  int unsigned n_fwd_err = 0;
  always @(posedge clk) begin
    if (scnx !== scl) n_fwd_err++;
    if (!dut.r.sdnx_ctrl && sdnx !== sda_line) n_fwd_err++;
    if (dut.r.sdnx_ctrl && sdnx !== 1'b1) n_fwd_err++;
  end

  // ---- watchdog -----------------------------------------------------------
  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stimulus -----------------------------------------------------------
  logic [7:0] wr[], rd[];
  bit ok, found;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(dut.r.state == ST_IDLE && !led_comm, "IDLE after reset");
    #7ns;  // keep the master's SCL edges off the clk edges

    // 1. address scan
    for (int a = 'h2C; a <= 'h39; a++) begin
      m.probe(7'(a), found);
      check(found == (a >= 'h30 && a <= 'h35), $sformatf("scan address 0x%02h", a));
      check(dut.r.state == ST_IDLE, "IDLE after probe");
    end

    // 2. alternating write & read on every chip
    for (int d = 0; d < NDEV; d++) begin
      for (int k = 0; k < 4; k++) begin
        wr = new[1];
        wr[0] = k[0] ? 8'hA5 : 8'h5A;
        m.reg_write(7'h30 + 7'(d), 8'h05, wr, ok);
        check(ok, "single write acknowledged");
        m.reg_read(7'h30 + 7'(d), 8'h05, 1, rd, ok);
        check(ok && rd[0] == wr[0], $sformatf("dev %0d read back %02h exp %02h", d, rd[0], wr[0]));
      end
    end

    // 3. multi-byte frames of 2..16 bytes
    for (int base = 0; base < 2; base++) begin
      for (int len = 2; len <= 16; len++) begin
        logic [6:0] dev;
        logic [7:0] ptr;
        dev = base ? 7'h35 : 7'h33;
        ptr = base ? 8'h14 : 8'h00;
        wr = new[len];
        foreach (wr[i]) wr[i] = 8'h41 + 8'(i) + 8'(len);  // differs per frame
        m.reg_write(dev, ptr, wr, ok);
        check(ok, $sformatf("write frame len %0d", len));
        m.reg_read(dev, ptr, len, rd, ok);
        check(ok, $sformatf("read frame len %0d", len));
        for (int i = 0; i < len; i++)
          check(rd[i] == wr[i], $sformatf("len %0d byte %0d: %02h exp %02h", len, i, rd[i], wr[i]));
        for (int i = 0; i < len; i++) begin
          logic [7:0] v;
          v = base ? g_dev[5].u_dev.mem[8'h14 + i] : g_dev[3].u_dev.mem[i];
          check(v == wr[i], $sformatf("slave register %0d", i));
        end
      end
    end

    // 4. missing device
    wr = new[2]; wr[0] = 8'h11; wr[1] = 8'h22;
    m.reg_write(7'h40, 8'h00, wr, ok);
    check(!ok, "missing device NACKs");
    check(dut.r.state == ST_IDLE, "IDLE after NACK");
    m.nacks--;

    // 5. single upsets in the TMR copies during a frame
    fork
      begin
        wr = new[4]; wr = '{8'hDE, 8'hAD, 8'hBE, 8'hEF};
        m.reg_write(7'h31, 8'h20, wr, ok);
        check(ok, "write with upsets");
        m.reg_read(7'h31, 8'h20, 4, rd, ok);
        check(ok && rd[0] == 8'hDE && rd[1] == 8'hAD && rd[2] == 8'hBE && rd[3] == 8'hEF,
              "read back across upsets");
      end
      begin
        for (int u = 0; u < 20; u++) begin
          #(1337ns);
          @(negedge clk);
          case (u % 3)
            0: dut.u_regs.copy0 = ~dut.u_regs.copy0;
            1: dut.u_regs.copy1 = ~dut.u_regs.copy1;
            default: dut.u_regs.copy2 = ~dut.u_regs.copy2;
          endcase
          n_upset++;
        end
      end
    join

    repeat (20) @(posedge clk);
    check(m.nacks == 0, $sformatf("unexpected NACKs: %0d", m.nacks));
    check(n_fwd_err == 0, $sformatf("lane forwarding errors: %0d", n_fwd_err));
    check(n_lat > 0 && n_lat_bad == 0, $sformatf("ACK_SLAVE reaction time (%0d bad of %0d)", n_lat_bad, n_lat));
    for (int i = 0; i < 8; i++)
      check(st_seen[i] > 0, $sformatf("state h%02h reached", 8'(1) << i));
    check(n_ack_pass > 0, "back lane passed to SDA");
    check(n_nack_idle > 0, "NACK returns to IDLE");
    check(n_rstart > 0, "repeated START seen");
    check(n_upset == 20, "upsets injected");
    check(!led_comm, "LED off when idle");
    $display("coverage: ack_pass=%0d nack_idle=%0d rstart=%0d upsets=%0d frames=%0d",
             n_ack_pass, n_nack_idle, n_rstart, n_upset, m.frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
