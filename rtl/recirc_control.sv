// recirc_control: the recirc_control_table and the "Recirculate?" decision.
//
// Holds the parsing depth written by the control plane: the number of times a
// frame is recirculated, so that its final pass processes waveform segment
// number `depth` (byte offset depth x 168 in the waveform). On every pass it
// compares the pass count carried in the frame's recirculation header (0 for
// a frame from a network port) with the depth and decides: recirculate when
// the frame is a DUNE frame, the count is below the depth and the frame still
// has bytes after the current window; otherwise the pass is final. For a
// recirculation it supplies the count for the next pass, count + 1.
//
// Timing: one register stage. cp_we loads depth from cp_wdata[7:0]; the depth
// is 0 after reset (no recirculation). The depth register and the decision
// follow the design description; stopping at the end of the frame is this
// design's addition so that a too-large depth cannot loop.
module recirc_control
  import dune_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cp_we,
  input  logic [63:0] cp_wdata,
  output logic [7:0]  depth,
  input  logic        in_valid,
  input  logic        dune,
  input  logic [7:0]  recirc_cnt,
  input  logic        more,
  output logic        out_valid,
  output logic        recirc,
  output logic [7:0]  next_cnt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      depth     <= '0;
      out_valid <= 1'b0;
      recirc    <= 1'b0;
      next_cnt  <= '0;
    end else begin
      if (cp_we) depth <= cp_wdata[7:0];
      out_valid <= in_valid;
      if (in_valid) begin
        recirc   <= dune && more && (recirc_cnt < depth);
        next_cnt <= recirc_cnt + 8'd1;
      end
    end
  end
endmodule
