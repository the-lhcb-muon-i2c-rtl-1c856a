// End-to-end testbench of muon_nsb_i2c_top at its default size (12 channels).
//
// Every channel has a main and an aux I2C master model and a chain of six
// DIALOG models (addresses 0x30..0x35) behind a long cable: each LVDS lane
// (clock, forward data, back data) is delayed by CABLE, about what 26 m of
// cable adds. Even channels use the main master, odd channels the aux master.
// All channels run at once, each doing:
//   * an address scan of 0x2C..0x39 (only 0x30..0x35 may answer),
//   * repeated write-and-read of two alternating bytes on every chip,
//   * write-and-read frames of 2..16 bytes at register 0x00 of chip 0x33 and
//     at register 0x14 of chip 0x35 (data "A".."P" shifted per frame),
// checking every byte through the bus and in the slave registers.
// Channel 3 first gets a channel reset in the middle of a write frame (the
// frame must end unacknowledged, the LED must go out, and the frames that
// follow must work), channel 5 gets single-copy upsets of
// its TMR registers during traffic, and the test pulses and channel resets
// are checked to reach the chain side. The number of times each mechanism
// happened is counted; one that never happened is a failure. Bus rate: 1 MHz
// SCL; converter clock 50 MHz.
`timescale 1ns/1ps
module tb_muon_nsb_i2c_top;
  import i2cconv_pkg::*;

  localparam int      N     = 12;
  localparam int      NDEV  = 6;
  localparam realtime TCLK  = 20ns;
  localparam realtime HALF  = 500ns;
  localparam realtime CABLE = 130ns;
  localparam int      NWR   = 4;    // alternating W&R rounds per chip

  logic clk = 1'b0;
  always #(TCLK / 2) clk = !clk;

  logic [N-1:0] in_sel, scl_main, sda_main_in, sda_main_pull, scl_aux, sda_aux_in, sda_aux_pull;
  logic [N-1:0] sd_nx, sc_nx, sd_bn, fe_res_n_in, fe_res_n_out, tst_pls_in, tst_pls_out, led_comm;

  muon_nsb_i2c_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int unsigned c_write = 0, c_read = 0, c_rstart = 0, c_slave_nack = 0, c_master_nack = 0;
  int unsigned c_aux = 0, c_main = 0, c_chres = 0, c_upset = 0, c_ackpass = 0, c_multi16 = 0;
  int unsigned done = 0;

  for (genvar ch = 0; ch < N; ch++) begin : g
    logic scl, drv, line, pull;
    logic sc_far, sd_far, bn_far;
    logic [NDEV-1:0] dd;

    // master side: both inputs see the same master model; in_sel picks one
    localparam bit AUX = (ch % 2 == 1);
    assign in_sel[ch]      = AUX;
    assign pull            = AUX ? sda_aux_pull[ch] : sda_main_pull[ch];
    assign line            = drv && !pull;
    assign scl_main[ch]    = AUX ? 1'b1 : scl;
    assign sda_main_in[ch] = AUX ? 1'b1 : line;
    assign scl_aux[ch]     = AUX ? scl  : 1'b1;
    assign sda_aux_in[ch]  = AUX ? line : 1'b1;

    // long cable on every lane
    assign #(CABLE) sc_far = sc_nx[ch];
    assign #(CABLE) sd_far = sd_nx[ch];
    assign #(CABLE) sd_bn[ch] = bn_far;
    assign bn_far = &dd;

    i2c_master_model #(.HALF(HALF)) m (.scl(scl), .sda_drv(drv), .sda_line(line));

    for (genvar k = 0; k < NDEV; k++) begin : d
      dialog_model #(.ADDR(7'h30 + 7'(k))) u (.sc_in(sc_far), .sd_in(sd_far), .sd_drv(dd[k]));
    end

    function automatic logic [7:0] slave_reg(input int k, input int a);
      case (k)
        3:       return g[ch].d[3].u.mem[a];
        default: return g[ch].d[5].u.mem[a];
      endcase
    endfunction

    // coverage from the converter of this channel
    conv_state_e ps = ST_IDLE;
    always @(negedge clk) begin
      conv_state_e s;
      s = dut.g_ch[ch].u_conv.u_core.r.state;
      if (s != ps) begin
        if (s == ST_START_INIT && ps != ST_IDLE) c_rstart++;
        if (s == ST_IDLE && ps == ST_ACK_SLAVE) c_slave_nack++;
        if (s == ST_IDLE && ps == ST_ACK_MASTER) c_master_nack++;
      end
      if (pull) c_ackpass++;
      ps = s;
    end

    initial begin
      logic [7:0] wr[], rd[];
      bit ok, found;
      #7ns;
      for (int a = 'h2C; a <= 'h39; a++) begin
        m.probe(7'(a), found);
        check(found == (a >= 'h30 && a <= 'h35), $sformatf("ch%0d scan 0x%02h", ch, a));
      end
      if (ch == 3) begin
        // channel reset in the middle of a write frame: the converter drops
        // back to IDLE, the master loses the slave's ACK and ends the frame
        wr = new[8];
        foreach (wr[i]) wr[i] = 8'hC0 + 8'(i);
        fork
          m.reg_write(7'h33, 8'h40, wr, ok);
          begin
            // (bounded wait, so that a broken converter cannot hang the test)
            for (int t = 0; t < 4000 && dut.g_ch[3].u_conv.u_core.r.state != ST_MASTER_DATA; t++)
              @(negedge clk);
            check(dut.g_ch[3].u_conv.u_core.r.state == ST_MASTER_DATA, "ch3 reached MASTER_DATA");
            #(5 * HALF);
            @(negedge clk) fe_res_n_in[3] = 1'b0;
            #1ns;
            check(fe_res_n_out[3] == 1'b0, "channel reset reaches the chain");
            check(led_comm[3] == 1'b0, "LED off while the channel is reset");
            check(dut.g_ch[3].u_conv.u_core.r.state == ST_IDLE, "FSM in IDLE during reset");
            repeat (5) @(negedge clk);
            fe_res_n_in[3] = 1'b1;
            c_chres++;
          end
        join
        check(!ok, "frame cut by the channel reset is not acknowledged");
        check(g[3].d[3].u.n_writes < 8, "frame cut by the channel reset is incomplete");
        m.nacks = 0;
      end
      for (int r = 0; r < NWR; r++)
        for (int k = 0; k < NDEV; k++) begin
          wr = new[1];
          wr[0] = r[0] ? 8'h55 : 8'hAA;
          m.reg_write(7'h30 + 7'(k), 8'h02, wr, ok);
          check(ok, $sformatf("ch%0d W dev %0d", ch, k));
          m.reg_read(7'h30 + 7'(k), 8'h02, 1, rd, ok);
          check(ok && rd[0] == wr[0], $sformatf("ch%0d R dev %0d: %02h exp %02h", ch, k, rd[0], wr[0]));
          c_write++; c_read++;
          if (AUX) c_aux++; else c_main++;
        end
      for (int base = 0; base < 2; base++)
        for (int len = 2; len <= 16; len++) begin
          int k, p;
          k = base ? 5 : 3;
          p = base ? 'h14 : 'h00;
          wr = new[len];
          foreach (wr[i]) wr[i] = 8'h41 + 8'((i + ch + len) % 16);
          m.reg_write(7'h30 + 7'(k), 8'(p), wr, ok);
          check(ok, $sformatf("ch%0d frame W len %0d", ch, len));
          m.reg_read(7'h30 + 7'(k), 8'(p), len, rd, ok);
          check(ok, $sformatf("ch%0d frame R len %0d", ch, len));
          for (int i = 0; i < len; i++) begin
            check(rd[i] == wr[i], $sformatf("ch%0d len %0d byte %0d: %02h exp %02h", ch, len, i, rd[i], wr[i]));
            check(slave_reg(k, p + i) == wr[i], $sformatf("ch%0d slave reg %0d", ch, p + i));
          end
          c_write++; c_read++;
          if (len == 16) c_multi16++;
        end
      check(m.nacks == 0, $sformatf("ch%0d unexpected NACKs %0d", ch, m.nacks));
      done++;
    end
  end

  // channel resets: released after power-up, then used in channel 3's test
  initial begin
    fe_res_n_in = '0;
    tst_pls_in  = '0;
    #100ns;
    fe_res_n_in = '1;
    #1ns;
    check(fe_res_n_out == '1, "channel resets released on the chain side");
  end

  // upsets of the TMR copies of channel 5 during traffic
  initial begin
    #7ns;
    for (int u = 0; u < 30; u++) begin
      #(2113ns);
      @(negedge clk);
      case (u % 3)
        0: dut.g_ch[5].u_conv.u_core.u_regs.copy0 = ~dut.g_ch[5].u_conv.u_core.u_regs.copy0;
        1: dut.g_ch[5].u_conv.u_core.u_regs.copy1 = ~dut.g_ch[5].u_conv.u_core.u_regs.copy1;
        default: dut.g_ch[5].u_conv.u_core.u_regs.copy2 = ~dut.g_ch[5].u_conv.u_core.u_regs.copy2;
      endcase
      c_upset++;
    end
  end

  // test pulses pass to the chain side
  initial begin
    #1us;
    for (int i = 0; i < 8; i++) begin
      tst_pls_in = N'($urandom);
      #1ns;
      check(tst_pls_out == tst_pls_in, "test pulse forwarded");
      #100ns;
    end
    tst_pls_in = '0;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done == N);
    repeat (10) @(posedge clk);
    check(c_write > 0,        "mechanism: register write frames");
    check(c_read > 0,         "mechanism: register read frames");
    check(c_multi16 == 2 * N, "mechanism: 16-byte frames on every channel");
    check(c_rstart > 0,       "mechanism: repeated START");
    check(c_slave_nack > 0,   "mechanism: slave NACK ends frame");
    check(c_master_nack > 0,  "mechanism: master NACK ends read");
    check(c_ackpass > 0,      "mechanism: back lane drives SDA");
    check(c_main > 0,         "mechanism: main input");
    check(c_aux > 0,          "mechanism: aux input");
    check(c_chres == 1,       "mechanism: channel reset mid-frame");
    check(c_upset == 30,      "mechanism: TMR upsets");
    check(led_comm == '0,     "all channels idle at the end");
    $display("counts: write=%0d read=%0d rstart=%0d slave_nack=%0d master_nack=%0d ackpass=%0d main=%0d aux=%0d chres=%0d upset=%0d",
             c_write, c_read, c_rstart, c_slave_nack, c_master_nack, c_ackpass, c_main, c_aux, c_chres, c_upset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
