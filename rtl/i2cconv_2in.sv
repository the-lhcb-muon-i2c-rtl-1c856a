// One converter channel with two selectable I2C master inputs.
//
// The channel serves one Front-End chain. Two I2C masters can be attached, a
// main one (normally the GBT-SCA) and an auxiliary one used for debugging;
// in_sel picks which of them talks to the chain (0 = main, 1 = aux). The
// selected master's SCL and SDA level feed core_i2cconv_tmr, and the core's
// SDA pull-down is routed back only to the selected master's SDA pad; the
// other master sees an idle, released SDA line.
//
// Interface: for each master x in {main, aux}: scl_x and sdain_x (pad levels
// in) and sdaout_x (1 = pull that SDA pad low, i.e. the open-drain enable of a
// pad whose data input is tied to ground). Chain side: sdnx, scnx (out) and
// sdbn (in). Plus clk, asynch_res_n and led_comm as in the core.
//
// Timing: the selection is combinational; in_sel is meant to be a static
// strap and should only change while both buses are idle.
//
// The two inputs, the select and the port names follow the channel symbol of
// the design; the select polarity and the release of the unselected pad are
// this design's choices.
module i2cconv_2in (
  input  logic clk,
  input  logic asynch_res_n,
  input  logic in_sel,
  // main I2C master
  input  logic scl_main,
  input  logic sdain_main,
  output logic sdaout_main,
  // auxiliary (debug) I2C master
  input  logic scl_aux,
  input  logic sdain_aux,
  output logic sdaout_aux,
  // LVDS lanes to/from the Front-End chain
  output logic sdnx,
  output logic scnx,
  input  logic sdbn,
  output logic led_comm
);

  logic scl_sel, sda_sel, sda_pull;

  always_comb begin
    scl_sel = in_sel ? scl_aux   : scl_main;
    sda_sel = in_sel ? sdain_aux : sdain_main;
  end

  core_i2cconv_tmr u_core (
    .clk         (clk),
    .asynch_res_n(asynch_res_n),
    .scl         (scl_sel),
    .sda_in      (sda_sel),
    .sda_pull    (sda_pull),
    .sdnx        (sdnx),
    .sdbn        (sdbn),
    .scnx        (scnx),
    .led_comm    (led_comm)
  );

  assign sdaout_main = sda_pull && !in_sel;
  assign sdaout_aux  = sda_pull &&  in_sel;

endmodule
