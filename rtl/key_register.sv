// key_register: the main key register that configures both cipher cascades.
//
// It holds KEY_BITS bits, 5 per RRG stage. Each bit is a D flip-flop whose
// next-state logic is one Fredkin gate on the lines (load, q, d): with load = 1
// the gate swaps q and d, so the register line takes the new key bit; with
// load = 0 it keeps its value. This is the simplest flip-flop built around a
// reversible gate; the register's width and role come from the cipher
// definition, its load port, reset and next-state gate are this design's
// choices.
//
// Interface: clk, rst_n (asynchronous, active low, clears the key to zero),
// load, key_in; key_q is the stored key.
// Timing: key_in is taken at the rising clk edge where load is 1 and appears
// on key_q after that edge.
module key_register
  import rrg_pkg::*;
#(
  parameter int unsigned KEY_W = KEY_BITS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [KEY_W-1:0] key_in,
  output logic [KEY_W-1:0] key_q
);

  logic [KEY_W-1:0] key_d;

  for (genvar i = 0; i < KEY_W; i++) begin : g_bit
    // Lines: 0 = load (control), 1 = stored bit, 2 = incoming bit.
    logic [2:0] lines_in, lines_out;
    assign lines_in = {key_in[i], key_q[i], load};
    fredkin_gate #(.N(3), .C(0), .L1(1), .L2(2)) u_fg (.x(lines_in), .y(lines_out));
    assign key_d[i] = lines_out[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) key_q <= '0;
    else        key_q <= key_d;
  end

endmodule
