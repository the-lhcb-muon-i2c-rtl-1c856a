// Shared types of the I2C long-line protocol converter.
//
// The converter FSM is one-hot: each state is a single bit of an 8-bit code,
// with the codes h01..h80 of the converter's flow chart. conv_regs_t bundles
// every register of the FSM (state, bit counter, read flag, lane controls and
// the SCL/SDA samplers) so that the whole bundle can be triplicated by one
// tmr_reg instance. The bundle layout is this design's own choice.
package i2cconv_pkg;

  typedef enum logic [7:0] {
    ST_IDLE        = 8'h01,  // bus free, SDA forwarded to the slaves
    ST_START_INIT  = 8'h02,  // START seen, bit counter cleared
    ST_SLAVE_ADDR  = 8'h04,  // master sends 7 address bits + R/W
    ST_R_OR_W      = 8'h08,  // R/W bit sampled, wait for its SCL fall
    ST_ACK_SLAVE   = 8'h10,  // slave drives ACK back to the master
    ST_MASTER_DATA = 8'h20,  // master sends a data byte (write)
    ST_SLAVE_DATA  = 8'h40,  // slave sends a data byte (read)
    ST_ACK_MASTER  = 8'h80   // master drives ACK/NACK to the slave
  } conv_state_e;

  // Width of the bit counter: it must hold the value 8.
  localparam int unsigned CNT_W = 4;

  typedef struct packed {
    conv_state_e        state;
    logic [CNT_W-1:0]   count;      // SCL rising edges seen in the current byte
    logic               read_flag;  // R/W bit of the address byte (1 = read)
    logic               counte_n;   // bit counter enable, active low (1 = hold cleared)
    logic               sdnx_ctrl;  // 1: forward lane held recessive; 0: SDA forwarded
    logic               sdbp_ctrl;  // 1: back lane ignored; 0: back lane drives SDA
    logic               scl_s0;     // first synchroniser stage of SCL
    logic               scl_new;    // SCL, synchronised
    logic               scl_old;    // scl_new one clock earlier
    logic               sda_s0;
    logic               sda_new;
    logic               sda_old;
  } conv_regs_t;

  // Register values after reset: IDLE with the outputs printed for IDLE, and
  // an idle (high) bus in the samplers so no false START is seen at release.
  localparam conv_regs_t CONV_REGS_RESET = '{
    state:     ST_IDLE,
    count:     '0,
    read_flag: 1'b0,
    counte_n:  1'b1,
    sdnx_ctrl: 1'b0,
    sdbp_ctrl: 1'b1,
    scl_s0:    1'b1,
    scl_new:   1'b1,
    scl_old:   1'b1,
    sda_s0:    1'b1,
    sda_new:   1'b1,
    sda_old:   1'b1
  };

endpackage
