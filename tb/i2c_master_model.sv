// Behavioural single-master I2C controller for the testbenches.
//
// It stands for one I2C master channel of the GBT-SCA (or the debug master):
// it drives SCL push-pull, drives SDA open-drain (sda_drv = 0 pulls the line
// low) and reads the resolved line on sda_line. Bit timing: SCL low for HALF,
// high for HALF; SDA changes a quarter of HALF after the SCL fall and is sampled
// in the middle of the high phase. Frames follow the I2C RAM protocol used by
// the Front-End chips: write = START, address+W, register pointer, data...,
// STOP; read = START, address+W, pointer, repeated START, address+R, data
// (ACK on all but the last byte, NACK on the last), STOP. At most MAX_BYTES
// data bytes per frame, as with the 16-byte buffer of the SCA I2C channel.
`timescale 1ns/1ps
module i2c_master_model #(
  parameter realtime HALF      = 500ns,
  parameter int      MAX_BYTES = 16
) (
  output logic scl,
  output logic sda_drv,
  input  logic sda_line
);

  int unsigned nacks;      // ACKs missing where the slave had to give one
  int unsigned frames;     // completed frames

  initial begin
    scl     = 1'b1;
    sda_drv = 1'b1;
    nacks   = 0;
    frames  = 0;
  end

  task automatic bus_start();
    // Also a repeated START: the line is released first.
    sda_drv = 1'b1;
    #(HALF / 4);
    scl = 1'b1;
    #(HALF / 2);
    sda_drv = 1'b0;
    #(HALF / 2);
    scl = 1'b0;
    #(HALF / 4);
  endtask

  task automatic bus_stop();
    sda_drv = 1'b0;
    #(HALF * 3 / 4);
    scl = 1'b1;
    #(HALF / 2);
    sda_drv = 1'b1;
    #(HALF);
  endtask

  // One clock pulse with SDA set to 'b', starting with SCL low; returns the
  // line level sampled in the middle of the high phase.
  task automatic bus_bit(input logic b, output logic sampled);
    sda_drv = b;
    #(HALF * 3 / 4);
    scl = 1'b1;
    #(HALF / 2);
    sampled = sda_line;
    #(HALF / 2);
    scl = 1'b0;
    #(HALF / 4);
  endtask

  task automatic write_byte(input logic [7:0] b, output logic ack);
    logic s;
    for (int i = 7; i >= 0; i--) bus_bit(b[i], s);
    bus_bit(1'b1, s);
    ack = !s;
    if (!ack) nacks++;
  endtask

  task automatic read_byte(output logic [7:0] b, input logic give_ack);
    logic s;
    for (int i = 7; i >= 0; i--) begin
      bus_bit(1'b1, s);
      b[i] = s;
    end
    bus_bit(!give_ack, s);
  endtask

  task automatic reg_write(input logic [6:0] dev, input logic [7:0] ptr,
                           input logic [7:0] data[], output bit ok);
    logic a;
    ok = 1;
    bus_start();
    write_byte({dev, 1'b0}, a); ok &= a;
    if (ok) begin
      write_byte(ptr, a); ok &= a;
      for (int i = 0; i < data.size() && i < MAX_BYTES && ok; i++) begin
        write_byte(data[i], a); ok &= a;
      end
    end
    bus_stop();
    frames++;
  endtask

  task automatic reg_read(input logic [6:0] dev, input logic [7:0] ptr, input int n,
                          output logic [7:0] data[], output bit ok);
    logic a;
    if (n > MAX_BYTES) n = MAX_BYTES;
    data = new[n];
    ok = 1;
    bus_start();
    write_byte({dev, 1'b0}, a); ok &= a;
    if (ok) begin
      write_byte(ptr, a); ok &= a;
    end
    if (ok) begin
      bus_start();
      write_byte({dev, 1'b1}, a); ok &= a;
      if (ok)
        for (int i = 0; i < n; i++) read_byte(data[i], i != n - 1);
    end
    bus_stop();
    frames++;
  endtask

  // Address probe as done by a bus scanner: START, address+W, STOP.
  task automatic probe(input logic [6:0] dev, output bit found);
    logic a;
    bus_start();
    write_byte({dev, 1'b0}, a);
    bus_stop();
    found = a;
    if (!a) nacks--;  // a missing device is expected during a scan
  endtask

endmodule
