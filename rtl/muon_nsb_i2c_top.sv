// Converter logic of the muon new Service Board: N_CH long-line I2C channels.
//
// Each Front-End channel of the muon detector is a chain of Front-End boards
// reached over LVDS lanes. Each channel gets one i2cconv_2in converter, so
// that a standard I2C master (main input, e.g. a GBT-SCA I2C channel) or a
// debug master (aux input) can reach the chain as if it were an ordinary I2C
// bus. Next to the converter each channel carries two plain signals to the
// chain: the Front-End channel reset, which also resets that channel's
// converter, and a test pulse.
//
// Ports are per-channel bit vectors, bit i belonging to channel i:
//   scl_main, sda_main_in, sda_main_pull   main master (pull = drive SDA low)
//   scl_aux,  sda_aux_in,  sda_aux_pull    debug master
//   in_sel                                 per channel: 0 = main, 1 = aux
//   sd_nx, sc_nx (out), sd_bn (in)         LVDS data/clock lanes of the chain
//   fe_res_n_in / fe_res_n_out             channel reset, active low, in from
//                                          the control side, out to the chain
//   tst_pls_in / tst_pls_out               test pulse, passed to the chain
//   led_comm                               channel busy indicator
// The pad buffers (single-ended, open-drain and LVDS) and the clock
// conditioning of the FPGA are outside this module: clk is the converter
// clock, and the LVDS lanes appear here as their logic levels.
//
// N_CH = 12 follows the design (twelve converters in one FPGA). Driving the
// converter reset from the channel reset input, its active-low polarity and
// one select per channel are this design's reading of the channel schematic.
module muon_nsb_i2c_top #(
  parameter int unsigned N_CH = 12
) (
  input  logic            clk,
  input  logic [N_CH-1:0] in_sel,
  input  logic [N_CH-1:0] scl_main,
  input  logic [N_CH-1:0] sda_main_in,
  output logic [N_CH-1:0] sda_main_pull,
  input  logic [N_CH-1:0] scl_aux,
  input  logic [N_CH-1:0] sda_aux_in,
  output logic [N_CH-1:0] sda_aux_pull,
  output logic [N_CH-1:0] sd_nx,
  output logic [N_CH-1:0] sc_nx,
  input  logic [N_CH-1:0] sd_bn,
  input  logic [N_CH-1:0] fe_res_n_in,
  output logic [N_CH-1:0] fe_res_n_out,
  input  logic [N_CH-1:0] tst_pls_in,
  output logic [N_CH-1:0] tst_pls_out,
  output logic [N_CH-1:0] led_comm
);

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    i2cconv_2in u_conv (
      .clk         (clk),
      .asynch_res_n(fe_res_n_in[i]),
      .in_sel      (in_sel[i]),
      .scl_main    (scl_main[i]),
      .sdain_main  (sda_main_in[i]),
      .sdaout_main (sda_main_pull[i]),
      .scl_aux     (scl_aux[i]),
      .sdain_aux   (sda_aux_in[i]),
      .sdaout_aux  (sda_aux_pull[i]),
      .sdnx        (sd_nx[i]),
      .scnx        (sc_nx[i]),
      .sdbn        (sd_bn[i]),
      .led_comm    (led_comm[i])
    );
  end

  assign fe_res_n_out = fe_res_n_in;
  assign tst_pls_out  = tst_pls_in;

endmodule
