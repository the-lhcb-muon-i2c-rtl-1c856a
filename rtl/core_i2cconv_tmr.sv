// I2C long-line protocol converter core (one Front-End channel).
//
// A standard I2C master (for instance a GBT-SCA I2C channel) drives SCL and the
// wired-AND SDA line. The Front-End slaves are reached over LVDS, which cannot
// be wired-AND, so the single SDA wire is split into two unidirectional lanes:
// the forward lane sdnx towards the slaves and the back lane sdbn from them.
// SCL needs only one lane (single master) and is forwarded unchanged on scnx.
//
// The converter follows the frame just far enough to know who owns SDA:
//   * master-driven bits (START/STOP, address + R/W, write data, the master's
//     ACK/NACK on reads): SDA is copied onto the forward lane;
//   * slave-driven bits (the slave's ACK, read data): the back lane is copied
//     onto SDA by pulling the SDA pad low (sda_pull) whenever sdbn is 0, while
//     the forward lane is held at the recessive level 1.
// An 8-state one-hot FSM (IDLE, START_INIT, SLAVE_ADDR, R_or_W, ACK_SLAVE,
// MASTER_DATA, SLAVE_DATA, ACK_MASTER) tracks this. A 4-bit counter, enabled
// by counte_n = 0, counts SCL rising edges within a byte. The R/W bit is
// sampled on the 8th rising edge of the address byte. A NACK from the slave
// after the address or a data byte, or a NACK from the master after a read
// byte, returns the FSM to IDLE. A START seen in any state re-enters
// START_INIT (repeated START) and a STOP seen in any state returns to IDLE;
// any code that is not one of the eight states also returns to IDLE.
//
// Timing: SCL and SDA are sampled on clk through a synchroniser stage and then
// scl_new/scl_old (sda_new/sda_old), so the FSM reacts three clk cycles after
// an SCL edge. The lane controls are registered with the state; the data paths
// (sda -> sdnx, sdbn -> sda_pull, scl -> scnx) are combinational, so the
// outputs depend on state and inputs (Mealy). clk must be many times faster
// than SCL: the slave's ACK reaches SDA about four clk cycles after the SCL
// fall and must be there well before the next SCL rise.
//
// Every FSM register is triplicated and majority-voted (tmr_reg).
//
// What follows the converter's flow chart: the state names and one-hot codes,
// the lane-control and counter-enable values of every state, the edge
// conditions and the counter tests. This design's choices: the synchroniser
// stage, the global START/STOP handling outside IDLE, the polarity of the
// lane controls (1 = lane held recessive), and one transition: after a master
// data byte the FSM goes from MASTER_DATA straight to ACK_SLAVE once SCL is
// low with 8 bits counted, so that the slave's ACK on the 9th clock is passed
// back. The counter semantics are assumed as well (cleared while counte_n = 1,
// +1 on each SCL rising edge).
//
// Ports:
//   clk, asynch_res_n  converter clock; asynchronous active-low reset
//   scl                SCL from the I2C master
//   sda_in             level of the SDA line (wired-AND of master and sda_pull)
//   sda_pull           1: pull the SDA pad low (open-drain driver enable)
//   sdnx               forward data lane to the slave chain
//   sdbn               back data lane from the slave chain
//   scnx               SCL lane to the slave chain
//   led_comm           1 while a frame is in progress (state is not IDLE)
module core_i2cconv_tmr
  import i2cconv_pkg::*;
(
  input  logic clk,
  input  logic asynch_res_n,
  input  logic scl,
  input  logic sda_in,
  output logic sda_pull,
  output logic sdnx,
  input  logic sdbn,
  output logic scnx,
  output logic led_comm
);

  conv_regs_t r;  // voted register values
  conv_regs_t n;  // next register values

  tmr_reg #(
    .WIDTH      ($bits(conv_regs_t)),
    .RESET_VALUE(CONV_REGS_RESET)
  ) u_regs (
    .clk  (clk),
    .rst_n(asynch_res_n),
    .d    (n),
    .q    (r)
  );

  logic scl_rise, scl_fall, start_cond, stop_cond;
  conv_state_e nxt;

  always_comb begin
    scl_rise   = !r.scl_old &&  r.scl_new;
    scl_fall   =  r.scl_old && !r.scl_new;
    start_cond =  r.scl_old &&  r.scl_new &&  r.sda_old && !r.sda_new;
    stop_cond  =  r.scl_old &&  r.scl_new && !r.sda_old &&  r.sda_new;
  end

  always_comb begin
    n = r;

    // Input samplers.
    n.scl_s0  = scl;
    n.scl_new = r.scl_s0;
    n.scl_old = r.scl_new;
    n.sda_s0  = sda_in;
    n.sda_new = r.sda_s0;
    n.sda_old = r.sda_new;

    // Bit counter.
    if (r.counte_n)     n.count = '0;
    else if (scl_rise)  n.count = r.count + 1'b1;

    // Next state.
    nxt = r.state;
    unique case (r.state)
      ST_IDLE:        if (start_cond) nxt = ST_START_INIT;
      ST_START_INIT:  nxt = ST_SLAVE_ADDR;
      ST_SLAVE_ADDR:  if (scl_rise && r.count == CNT_W'(7)) begin
                        n.read_flag = r.sda_new;
                        nxt         = ST_R_OR_W;
                      end
      ST_R_OR_W:      if (scl_fall) nxt = ST_ACK_SLAVE;
      ST_ACK_SLAVE:   if (scl_fall) begin
                        if (r.sda_old)       nxt = ST_IDLE;         // no ACK
                        else if (r.read_flag) nxt = ST_SLAVE_DATA;  // ACK, read
                        else                 nxt = ST_MASTER_DATA;  // ACK, write
                      end
      ST_MASTER_DATA: if (!r.scl_new && r.count == CNT_W'(8)) nxt = ST_ACK_SLAVE;
      ST_SLAVE_DATA:  if (scl_fall && r.count == CNT_W'(8))   nxt = ST_ACK_MASTER;
      ST_ACK_MASTER:  if (scl_fall) nxt = r.sda_old ? ST_IDLE : ST_SLAVE_DATA;
      default:        nxt = ST_IDLE;   // not a legal one-hot code
    endcase

    // START and STOP are recognised in every state.
    if (stop_cond)       nxt = ST_IDLE;
    else if (start_cond) nxt = ST_START_INIT;

    n.state = nxt;

    // Registered outputs of the next state.
    unique case (nxt)
      ST_IDLE:        begin n.counte_n = 1'b1; n.sdnx_ctrl = 1'b0; n.sdbp_ctrl = 1'b1; end
      ST_START_INIT:  begin n.counte_n = 1'b1; n.sdnx_ctrl = 1'b0; n.sdbp_ctrl = 1'b1; end
      ST_SLAVE_ADDR:  begin n.counte_n = 1'b0; n.sdnx_ctrl = 1'b0; n.sdbp_ctrl = 1'b1; end
      ST_R_OR_W:      begin n.counte_n = 1'b1; n.sdnx_ctrl = 1'b0; n.sdbp_ctrl = 1'b1; end
      ST_ACK_SLAVE:   begin n.counte_n = 1'b1; n.sdnx_ctrl = 1'b1; n.sdbp_ctrl = 1'b0; end
      ST_MASTER_DATA: begin n.counte_n = 1'b0; n.sdnx_ctrl = 1'b0; n.sdbp_ctrl = 1'b1; end
      ST_SLAVE_DATA:  begin n.counte_n = 1'b0; n.sdnx_ctrl = 1'b1; n.sdbp_ctrl = 1'b0; end
      ST_ACK_MASTER:  begin n.counte_n = 1'b1; n.sdnx_ctrl = 1'b0; n.sdbp_ctrl = 1'b1; end
      default:        begin n.counte_n = 1'b1; n.sdnx_ctrl = 1'b0; n.sdbp_ctrl = 1'b1; end
    endcase
  end

  // Lane data paths.
  assign sdnx     = sda_in | r.sdnx_ctrl;
  assign sda_pull = !r.sdbp_ctrl && !sdbn;
  assign scnx     = scl;
  assign led_comm = (r.state != ST_IDLE);

  // The two lanes are never handed to the slaves and to the master at once.
  a_one_direction: assert property (@(posedge clk) disable iff (!asynch_res_n)
    r.sdnx_ctrl || r.sdbp_ctrl);

endmodule
