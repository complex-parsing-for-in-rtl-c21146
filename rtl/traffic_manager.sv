// traffic_manager: sends each frame leaving the ingress pipeline to the
// egress port, to the recirculation port, or drops it.
//
// The deparser's routing fields are constant for a frame. Frames marked for
// recirculation are written into the recirculation buffer (a FIFO of
// RECIRC_DEPTH beats) from which the port merge feeds them back to the
// parser; dropped frames are consumed and discarded; the rest leave on the
// egress stream with their egress port. Recirculation in the target switch
// happens after the egress pipeline; that pipeline does no work in this
// design and is not modelled. `frame_exit` pulses when a frame leaves the
// recirculation loop (forwarded or dropped), which the port merge uses to
// limit the frames inside the loop to what the buffer can hold. Frame counters: forwarded, recirculated, dropped.
//
// Timing: egress is a direct valid/ready path; the recirculation buffer adds
// one cycle. The three routes follow the design description; the buffer
// depth and admission rule are this design's choice.
module traffic_manager
  import dune_pkg::*;
#(
  parameter int RECIRC_DEPTH = 2 * MAX_FRAME_BEATS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  beat_t       in_beat,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_recirc,
  input  logic        in_drop,
  input  port_t       in_port,
  output beat_t       eg_beat,
  output logic        eg_valid,
  input  logic        eg_ready,
  output port_t       eg_port,
  output beat_t       rc_beat,
  output logic        rc_valid,
  input  logic        rc_ready,
  output logic        frame_exit,
  output logic [31:0] n_fwd,
  output logic [31:0] n_recirc,
  output logic [31:0] n_drop
);
  localparam int CW = $clog2(RECIRC_DEPTH) + 1;
  logic          q_in_valid, q_in_ready;
  logic [CW-1:0] q_count, q_free;
  logic          fire_last;

  assign q_in_valid = in_valid && in_recirc;
  assign eg_valid   = in_valid && !in_recirc && !in_drop;
  assign eg_beat    = in_beat;
  assign eg_port    = in_port;
  assign in_ready   = in_recirc ? q_in_ready : in_drop ? 1'b1 : eg_ready;
  assign fire_last  = in_valid && in_ready && in_beat.last;

  stream_fifo #(.DEPTH(RECIRC_DEPTH)) u_recirc_buf (
    .clk, .rst_n,
    .in_beat  (in_beat), .in_valid(q_in_valid), .in_ready(q_in_ready),
    .out_beat (rc_beat), .out_valid(rc_valid),  .out_ready(rc_ready),
    .count    (q_count), .free(q_free)
  );

  assign frame_exit = fire_last && !in_recirc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_fwd    <= '0;
      n_recirc <= '0;
      n_drop   <= '0;
    end else if (fire_last) begin
      if (in_recirc)    n_recirc <= n_recirc + 32'd1;
      else if (in_drop) n_drop   <= n_drop + 32'd1;
      else              n_fwd    <= n_fwd + 32'd1;
    end
  end

  a_route_stable : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && in_ready && !in_beat.last |=> $stable(in_recirc) && $stable(in_drop) && $stable(in_port));
endmodule
