// stream_fifo: first-word-fall-through FIFO of stream beats.
//
// Holds frame bytes outside the header pipeline: the frame body while its
// header vector is processed, and recirculated frames waiting to re-enter the
// parser. A circular buffer of DEPTH beats with a read pointer, a write pointer
// and an occupancy count; the head beat is presented combinationally
// (out_valid whenever the FIFO is not empty). A beat is written when
// in_valid && in_ready and removed when out_valid && out_ready, both in the
// same cycle if wanted. `free` reports empty slots so that a producer can
// check room for a whole frame before starting one.
// DEPTH is this design's choice: enough beats for the largest frame.
module stream_fifo
  import dune_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  beat_t                  in_beat,
  input  logic                   in_valid,
  output logic                   in_ready,
  output beat_t                  out_beat,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [$clog2(DEPTH):0] count,
  output logic [$clog2(DEPTH):0] free
);
  localparam int AW = $clog2(DEPTH);

  beat_t           mem [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;
  logic            wr_en, rd_en;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_beat  = mem[rd_ptr];
  assign free      = (AW+1)'(DEPTH) - count;
  assign wr_en     = in_valid && in_ready;
  assign rd_en     = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= in_beat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (rd_en) rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(wr_en) - (AW+1)'(rd_en);
    end
  end

  // A producer holds a beat until it is taken.
  a_in_hold : assert property (@(posedge clk) disable iff (!rst_n)
                               in_valid && !in_ready |=> in_valid);
endmodule
