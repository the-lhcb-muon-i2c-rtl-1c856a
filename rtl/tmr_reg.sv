// Triple-modular-redundant register with a bitwise majority voter.
//
// Three identical copies of a WIDTH-bit register load the same input d on
// every clock; the output q is the 2-of-3 majority of the three copies, bit by
// bit, so a single upset copy is outvoted. When q is fed back through the
// next-state logic (as in an FSM), the upset copy is rewritten with the voted
// value on the next clock, so an upset lasts at most one cycle in one copy.
//
// Interface: clk, asynchronous active-low reset rst_n (all copies load
// RESET_VALUE), d in, q out (combinational from the copies, no extra latency).
//
// Triplicating the FSM registers and voting them follows the design; writing
// the triplication out in RTL, rather than leaving it to a synthesis
// directive, is this design's choice. The keep attributes on the copies and
// on their processes stop synthesis from merging the three identical copies.
module tmr_reg #(
  parameter int unsigned             WIDTH       = 1,
  parameter logic [WIDTH-1:0]        RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  (* keep = 1, syn_preserve = 1 *) logic [WIDTH-1:0] copy0;
  (* keep = 1, syn_preserve = 1 *) logic [WIDTH-1:0] copy1;
  (* keep = 1, syn_preserve = 1 *) logic [WIDTH-1:0] copy2;

  // One process per copy, each marked keep so that synthesis does not merge
  // the three equivalent flip-flops into one.
  (* keep = 1, syn_preserve = 1 *)
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) copy0 <= RESET_VALUE;
    else        copy0 <= d;

  (* keep = 1, syn_preserve = 1 *)
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) copy1 <= RESET_VALUE;
    else        copy1 <= d;

  (* keep = 1, syn_preserve = 1 *)
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) copy2 <= RESET_VALUE;
    else        copy2 <= d;

  // Bitwise 2-of-3 voter.
  assign q = (copy0 & copy1) | (copy0 & copy2) | (copy1 & copy2);

endmodule
