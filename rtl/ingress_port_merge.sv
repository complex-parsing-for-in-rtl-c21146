// ingress_port_merge: merges frames from the network ports and from the
// recirculation port into the parser, prefixing each with 16 bytes of
// metadata.
//
// There are NET_PORTS network inputs (one per sender attached to the
// switch) and one recirculation input. Arbitration is per frame and
// round-robin over all of them: after a frame from source s, the search for
// the next frame starts at source s+1. A frame from the network is only
// admitted while fewer than LOOP_FRAMES frames are inside the pipeline and
// the recirculation loop (a frame leaves the loop when the traffic manager
// forwards or drops it, signalled by `frame_exit`). With a recirculation
// buffer of LOOP_FRAMES maximum-size frames the loop can then never block
// itself. Network frames that wait are not lost: their inputs are held back
// (ready low) and every cycle a network input has a frame waiting that is not
// being taken adds one to `mac_wait_cycles`: this is where incoming and
// recirculated traffic compete for the pipeline. Each granted frame is
// preceded by 8 bytes of intrinsic metadata {resubmit flag, pad, version, pad,
// 9-bit ingress port, 48-bit arrival timestamp} and 8 bytes of port metadata
// (zero: the program uses none). The ingress port is MAC_PORT + i for network
// input i and RECIRC_PORT for recirculated frames, which is how the parser
// tells recirculated frames apart.
//
// Timing: two metadata beats, then the frame's beats passed straight
// through (valid/ready of the selected input, no added latency).
// The 16-byte prefix and the two network senders of the evaluation follow the
// design description; the arbitration policy, the admission rule and the
// metadata bit layout are this design's.
module ingress_port_merge
  import dune_pkg::*;
#(
  parameter int    NET_PORTS   = 2,
  parameter port_t MAC_PORT    = 9'd0,
  parameter port_t RECIRC_PORT = 9'd68,
  parameter int    LOOP_FRAMES = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  beat_t [NET_PORTS-1:0]      mac_beat,
  input  logic  [NET_PORTS-1:0]      mac_valid,
  output logic  [NET_PORTS-1:0]      mac_ready,
  input  beat_t                      rc_beat,
  input  logic                       rc_valid,
  output logic                       rc_ready,
  input  logic                       frame_exit,
  output beat_t                      out_beat,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [31:0]                mac_wait_cycles,
  output logic [31:0]                n_mac_frames,
  output logic [31:0]                n_rc_frames
);
  localparam int META_BEATS = META_BYTES / BEAT_BYTES;
  localparam int NS         = NET_PORTS + 1;       // sources; NET_PORTS = recirculation
  localparam int SW         = $clog2(NS + 1);

  typedef enum logic [1:0] {M_IDLE, M_META, M_DATA} state_e;
  state_e state;

  logic [SW-1:0]  sel, last_sel, pick;
  logic           pick_v;
  logic [NS-1:0]  req;
  logic [47:0]    tstamp, tstamp_q;
  logic [$clog2(META_BEATS+1)-1:0] mcnt;
  logic [META_BYTES-1:0][7:0] meta;
  logic [7:0]     loop_frames;
  logic           sel_rc;
  logic [31:0]    n_waiting;

  always_comb begin
    for (int i = 0; i < NET_PORTS; i++)
      req[i] = mac_valid[i] && (32'(loop_frames) < LOOP_FRAMES);
    req[NET_PORTS] = rc_valid;
  end

  // first requesting source after last_sel, in cyclic order
  always_comb begin
    logic [SW-1:0] s;
    pick   = '0;
    pick_v = 1'b0;
    for (int k = NS; k >= 1; k--) begin
      s = SW'((32'(last_sel) + k) % NS);
      if (req[s]) begin
        pick   = s;
        pick_v = 1'b1;
      end
    end
  end

  assign sel_rc = (32'(sel) == NET_PORTS);

  always_comb begin
    port_t p;
    p = sel_rc ? RECIRC_PORT : port_t'(MAC_PORT + port_t'(sel));
    meta = '0;
    meta[0] = {7'b0, p[8]};
    meta[1] = p[7:0];
    for (int i = 0; i < 6; i++) meta[2 + i] = tstamp_q[8*(5-i) +: 8];
  end

  always_comb begin
    out_beat  = '0;
    out_valid = 1'b0;
    mac_ready = '0;
    rc_ready  = 1'b0;
    case (state)
      M_META: begin
        for (int i = 0; i < BEAT_BYTES; i++)
          out_beat.data[8*i +: 8] = meta[32'(mcnt) * BEAT_BYTES + i];
        out_beat.keep = '1;
        out_valid     = 1'b1;
      end
      M_DATA: begin
        if (sel_rc) begin
          out_beat  = rc_beat;
          out_valid = rc_valid;
          rc_ready  = out_ready;
        end else begin
          for (int i = 0; i < NET_PORTS; i++) if (32'(sel) == i) begin
            out_beat     = mac_beat[i];
            out_valid    = mac_valid[i];
            mac_ready[i] = out_ready;
          end
        end
      end
      default: ;
    endcase
  end

  // network inputs holding a frame that is not being taken this cycle
  always_comb begin
    n_waiting = '0;
    for (int i = 0; i < NET_PORTS; i++)
      if (mac_valid[i] && !(state == M_DATA && 32'(sel) == i)
          && !(state == M_IDLE && pick_v && 32'(pick) == i))
        n_waiting = n_waiting + 32'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= M_IDLE;
      sel             <= '0;
      last_sel        <= SW'(NET_PORTS);
      tstamp          <= '0;
      tstamp_q        <= '0;
      mcnt            <= '0;
      mac_wait_cycles <= '0;
      n_mac_frames    <= '0;
      n_rc_frames     <= '0;
      loop_frames     <= '0;
    end else begin
      loop_frames <= loop_frames
                   + 8'(state == M_IDLE && pick_v && 32'(pick) != NET_PORTS)
                   - 8'(frame_exit);
      tstamp          <= tstamp + 48'd1;
      mac_wait_cycles <= mac_wait_cycles + n_waiting;
      case (state)
        M_IDLE: if (pick_v) begin
          sel      <= pick;
          last_sel <= pick;
          tstamp_q <= tstamp;
          mcnt     <= '0;
          state    <= M_META;
          if (32'(pick) == NET_PORTS) n_rc_frames  <= n_rc_frames + 32'd1;
          else                        n_mac_frames <= n_mac_frames + 32'd1;
        end
        M_META: if (out_ready) begin
          if (32'(mcnt) == META_BEATS - 1) state <= M_DATA;
          mcnt <= mcnt + 1'b1;
        end
        M_DATA: if (out_valid && out_ready && out_beat.last) state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  a_loop_bound : assert property (@(posedge clk) disable iff (!rst_n)
                                  32'(loop_frames) <= LOOP_FRAMES);
endmodule
