// Behavioural model of a Front-End DIALOG chip as an I2C slave on the LVDS
// lanes (not synthesizable; testbench use only).
//
// The chip behaves like an I2C RAM: NREG byte registers, a register pointer
// written by the first byte after address+W, auto-increment after every data
// byte, reads from the pointer after a repeated START with address+R. On the
// LVDS link SDA is split: sd_in is the forward lane (from the converter), and
// sd_drv is this chip's contribution to the back lane (0 = pull low); the
// back lane of a daisy chain is the AND of all chips' contributions. SCL is
// the sc_in lane. Registers start at 0. Unused pointer values read 0 and
// ignore writes.
`timescale 1ns/1ps
module dialog_model #(
  parameter logic [6:0] ADDR = 7'h30,
  parameter int         NREG = 93
) (
  input  logic sc_in,
  input  logic sd_in,
  output logic sd_drv
);

  typedef enum {P_IDLE, P_ADDR, P_PTR, P_WDATA, P_RDATA} phase_e;

  logic [7:0] mem [NREG];
  phase_e     phase;
  int         bitn;
  logic [7:0] shreg, txbyte, ptr;
  logic       rw, mack, skip_fall;
  int unsigned n_start, n_writes, n_reads;

  initial begin
    foreach (mem[i]) mem[i] = 8'h00;
    phase = P_IDLE; bitn = 0; sd_drv = 1'b1; ptr = '0; skip_fall = 1'b0;
    shreg = '0; txbyte = '0; rw = 1'b0; mack = 1'b0;
    n_start = 0; n_writes = 0; n_reads = 0;
  end

  function automatic logic [7:0] rd(input logic [7:0] p);
    return (p < NREG) ? mem[p] : 8'h00;
  endfunction

  // START / repeated START
  always @(negedge sd_in) if (sc_in) begin
    phase = P_ADDR; bitn = 0; sd_drv = 1'b1; skip_fall = 1'b1; n_start++;
  end

  // STOP
  always @(posedge sd_in) if (sc_in) begin
    phase = P_IDLE; sd_drv = 1'b1;
  end

  always @(posedge sc_in) if (phase != P_IDLE) begin
    if (bitn < 8) begin
      if (phase != P_RDATA) shreg = {shreg[6:0], sd_in};
    end else if (phase == P_RDATA) begin
      mack = !sd_in;
    end
  end

  always @(negedge sc_in) if (phase != P_IDLE) begin
    if (skip_fall) begin
      skip_fall = 1'b0;               // the SCL fall that ends START
    end else if (bitn < 7) begin
      bitn++;
      if (phase == P_RDATA) sd_drv = txbyte[7-bitn];
    end else if (bitn == 7) begin     // end of the 8th bit
      bitn = 8;
      unique case (phase)
        P_ADDR:  if (shreg[7:1] == ADDR) begin rw = shreg[0]; sd_drv = 1'b0; end
                 else phase = P_IDLE;
        P_PTR:   begin ptr = shreg; sd_drv = 1'b0; end
        P_WDATA: begin
                   if (ptr < NREG) mem[ptr] = shreg;
                   ptr++; n_writes++; sd_drv = 1'b0;
                 end
        P_RDATA: sd_drv = 1'b1;       // master's ACK clock
        default: ;
      endcase
    end else begin                    // end of the 9th (ACK) bit
      bitn = 0;
      unique case (phase)
        P_ADDR:  if (rw) begin
                   phase = P_RDATA; txbyte = rd(ptr); ptr++; n_reads++; sd_drv = txbyte[7];
                 end else begin
                   phase = P_PTR; sd_drv = 1'b1;
                 end
        P_PTR:   begin phase = P_WDATA; sd_drv = 1'b1; end
        P_WDATA: sd_drv = 1'b1;
        P_RDATA: if (mack) begin
                   txbyte = rd(ptr); ptr++; n_reads++; sd_drv = txbyte[7];
                 end else begin
                   phase = P_IDLE; sd_drv = 1'b1;
                 end
        default: ;
      endcase
    end
  end

endmodule
