// byte_packer: joins byte runs of any length and lane position into a dense
// stream of full beats.
//
// The deparser feeds it header bytes and frame-body beats whose valid bytes
// start at an arbitrary lane (the body was split from the header window at
// an arbitrary byte). Each input carries `in_n` bytes starting at lane
// `in_lo`. The packer appends them to a 2-beat accumulator and emits a beat
// whenever a full beat's worth is held; after an input flagged `in_last` it
// emits the remainder as the final beat with tlast set and a keep mask that
// is contiguous from lane 0.
//
// Timing: inputs are registered into the accumulator; an output beat is
// offered from the cycle after its bytes arrived. in_ready may depend on
// out_ready in the same cycle (no path from in_valid to out_valid).
// Used inside the deparser; this design's own helper.
module byte_packer
  import dune_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [BEAT_BITS-1:0]        in_data,
  input  logic [$clog2(BEAT_BYTES):0] in_lo,
  input  logic [$clog2(BEAT_BYTES):0] in_n,
  input  logic                        in_last,
  input  logic                        in_valid,
  output logic                        in_ready,
  output beat_t                       out_beat,
  output logic                        out_valid,
  input  logic                        out_ready
);
  localparam int W  = BEAT_BYTES;
  localparam int FW = $clog2(2*W) + 1;

  logic [2*W-1:0][7:0] acc, acc_n;
  logic [FW-1:0]       fill, out_n, base;
  logic                last_pend;
  logic                out_fire, in_fire;

  assign out_valid = (fill >= FW'(W)) || (last_pend && fill != '0);
  assign out_n     = (fill >= FW'(W)) ? FW'(W) : fill;
  assign out_fire  = out_valid && out_ready;
  assign base      = out_fire ? fill - out_n : fill;
  assign in_ready  = !last_pend && (base <= FW'(W));
  assign in_fire   = in_valid && in_ready;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      out_beat.data[8*i +: 8] = acc[i];
      out_beat.keep[i]        = (FW'(i) < out_n);
    end
    out_beat.last = last_pend && (fill <= FW'(W));
  end

  always_comb begin
    for (int i = 0; i < 2*W; i++) begin
      if (out_fire) acc_n[i] = (i + 32'(out_n) < 2*W) ? acc[i + 32'(out_n)] : 8'h00;
      else          acc_n[i] = acc[i];
    end
    if (in_fire) begin
      for (int i = 0; i < 2*W; i++) begin
        if (i >= 32'(base) && i < 32'(base) + 32'(in_n)
            && (i - 32'(base) + 32'(in_lo)) < W)
          acc_n[i] = in_data[8*(i - 32'(base) + 32'(in_lo)) +: 8];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      fill      <= '0;
      last_pend <= 1'b0;
    end else begin
      acc  <= acc_n;
      fill <= base + (in_fire ? FW'(in_n) : '0);
      if (in_fire && in_last)                last_pend <= 1'b1;
      else if (out_fire && out_beat.last)    last_pend <= 1'b0;
    end
  end

  a_n_in_range : assert property (@(posedge clk) disable iff (!rst_n)
                                  in_valid |-> (in_lo + in_n) <= ($clog2(BEAT_BYTES)+1)'(W));
endmodule
