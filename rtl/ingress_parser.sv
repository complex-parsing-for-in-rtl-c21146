// ingress_parser: captures the header window of a frame into a packet header
// vector (PHV) and sends the rest of the frame to the body buffer.
//
// Every frame arrives with 16 bytes in front of it: 8 bytes of intrinsic
// metadata (ingress port, arrival timestamp) and 8 bytes of port metadata,
// which are skipped. A frame whose ingress port is the recirculation port
// carries a 1-byte recirculation header holding its pass count right after
// them. The parser stores the first PRE_MAX bytes of the frame (metadata,
// recirculation header, Ethernet, IPv4, UDP, the opaque DAQ and WIB headers
// and one 21-word waveform segment) and forwards the remaining bytes,
// unchanged and with their lane positions, to the body output. From the
// stored window it extracts the headers along the parse graph
// Ethernet -> IPv4 (ethertype 0x0800, no options) -> UDP (protocol 17) ->
// DAQ -> WIB -> segment words, setting one validity bit per header and per
// segment word; a header is valid only if the frame is long enough for it.
// The DAQ, WIB and waveform words are not interpreted here: they are
// little-endian and are converted further down the pipeline.
//
// Timing: phv_valid pulses for one cycle, one cycle after the beat that
// completes the window (or ends the frame). The parser takes one frame at a
// time: it accepts the first beat of a new frame only when start_ok is high
// and, after the frame, waits for pass_done from the deparser.
// Interface: valid/ready stream in, valid/ready body stream out.
// The window size and the 16-byte prefix follow the design description; the
// one-frame-at-a-time flow control is this design's choice.
module ingress_parser
  import dune_pkg::*;
#(
  parameter port_t RECIRC_PORT = 9'd68
) (
  input  logic  clk,
  input  logic  rst_n,
  input  beat_t in_beat,
  input  logic  in_valid,
  output logic  in_ready,
  input  logic  start_ok,
  output phv_t  phv,
  output logic  phv_valid,
  output beat_t body_beat,
  output logic  body_valid,
  input  logic  body_ready,
  input  logic  pass_done
);
  typedef enum logic [1:0] {S_IDLE, S_CAP, S_BODY, S_WAIT} state_e;
  state_e state;

  logic [PRE_MAX-1:0][7:0] pre;
  logic [15:0]             pos;        // byte index of the current beat
  logic [8:0]              cap_len;    // bytes stored in pre[]
  logic                    rec_q;      // frame came from the recirculation port
  logic                    more_q;     // frame continues after the window
  logic                    ext_go;

  logic        capturing, fire, rec_now, win_end;
  logic [8:0]  pre_end;
  logic [BEAT_BYTES-1:0] body_keep;
  logic [8:0]  cap_add;

  assign capturing = (state == S_CAP) || (state == S_IDLE && start_ok);
  assign in_ready  = capturing ? body_ready : (state == S_BODY) ? body_ready : 1'b0;
  assign fire      = in_valid && in_ready;

  // The ingress port sits in bytes 0..1 of the intrinsic metadata.
  assign rec_now = (pos == 16'd0) ? ({in_beat.data[0], in_beat.data[15:8]} == RECIRC_PORT)
                                  : rec_q;
  assign pre_end = rec_now ? 9'(PRE_MAX) : 9'(PRE_MAX - RH_BYTES);

  always_comb begin
    body_keep = '0;
    cap_add   = '0;
    for (int i = 0; i < BEAT_BYTES; i++) begin
      if (in_beat.keep[i]) begin
        if (state == S_BODY || (32'(pos) + i >= 32'(pre_end))) body_keep[i] = 1'b1;
        else cap_add = cap_add + 9'd1;
      end
    end
  end

  assign win_end    = in_beat.last || (32'(pos) + BEAT_BYTES >= 32'(pre_end));
  assign body_valid = in_valid && (capturing || state == S_BODY) && (body_keep != '0);
  always_comb begin
    body_beat      = in_beat;
    body_beat.keep = body_keep;
  end

  always_ff @(posedge clk) begin
    if (fire && capturing) begin
      for (int i = 0; i < BEAT_BYTES; i++) begin
        if (32'(pos) + i < PRE_MAX) pre[32'(pos) + i] <= in_beat.data[8*i +: 8];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pos     <= '0;
      cap_len <= '0;
      rec_q   <= 1'b0;
      more_q  <= 1'b0;
      ext_go  <= 1'b0;
    end else begin
      ext_go <= 1'b0;
      case (state)
        S_IDLE, S_CAP: if (fire) begin
          if (state == S_IDLE) begin
            cap_len <= cap_add;
            rec_q   <= rec_now;
          end else begin
            cap_len <= cap_len + cap_add;
          end
          pos <= pos + 16'(BEAT_BYTES);
          if (win_end) begin
            ext_go <= 1'b1;
            more_q <= !in_beat.last;
            state  <= in_beat.last ? S_WAIT : S_BODY;
          end else begin
            state <= S_CAP;
          end
        end
        S_BODY: if (fire && in_beat.last) state <= S_WAIT;
        S_WAIT: if (pass_done) begin
          state <= S_IDLE;
          pos   <= '0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------- header extraction
  logic [8:0] base;
  logic [8:0] raw_len9;
  assign base     = rec_q ? 9'(META_BYTES + RH_BYTES) : 9'(META_BYTES);
  assign raw_len9 = (cap_len > base) ? cap_len - base : 9'd0;

  always_comb begin
    phv = '0;
    phv.is_recirc      = rec_q;
    phv.recirc_cnt     = rec_q ? pre[META_BYTES] : 8'd0;
    phv.ingress_port   = {pre[0][0], pre[1]};
    phv.ingress_tstamp = {pre[2], pre[3], pre[4], pre[5], pre[6], pre[7]};
    phv.more           = more_q;
    phv.raw_len        = raw_len9[7:0];
    for (int i = 0; i < RAW_MAX; i++) phv.raw[i] = pre[32'(base) + i];

    for (int i = 0; i < ETH_BYTES; i++)
      phv.eth[8*(ETH_BYTES-1-i) +: 8] = phv.raw[i];
    for (int i = 0; i < IPV4_BYTES; i++)
      phv.ipv4[8*(IPV4_BYTES-1-i) +: 8] = phv.raw[ETH_BYTES + i];
    for (int i = 0; i < UDP_BYTES; i++)
      phv.udp[8*(UDP_BYTES-1-i) +: 8] = phv.raw[ETH_BYTES + IPV4_BYTES + i];
    for (int w = 0; w < 2; w++)
      for (int i = 0; i < 8; i++) begin
        phv.daq_raw[w][8*(7-i) +: 8] = phv.raw[42 + 8*w + i];
        phv.wib_raw[w][8*(7-i) +: 8] = phv.raw[58 + 8*w + i];
      end
    for (int w = 0; w < SEG_WORDS; w++)
      for (int i = 0; i < 8; i++)
        phv.seg_raw[w][8*(7-i) +: 8] = phv.raw[HDR_BYTES + 8*w + i];

    phv.eth_v  = (raw_len9 >= 9'(ETH_BYTES));
    phv.ipv4_v = phv.eth_v && (phv.eth.ethertype == ETHERTYPE_IPV4)
              && (raw_len9 >= 9'(ETH_BYTES + IPV4_BYTES))
              && (phv.ipv4.version == 4'd4) && (phv.ipv4.ihl == 4'd5);
    phv.udp_v  = phv.ipv4_v && (phv.ipv4.protocol == IPPROTO_UDP)
              && (raw_len9 >= 9'(ETH_BYTES + IPV4_BYTES + UDP_BYTES));
    phv.daq_v  = phv.udp_v && (raw_len9 >= 9'(HDR_BYTES - WIB_BYTES));
    phv.wib_v  = phv.daq_v && (raw_len9 >= 9'(HDR_BYTES));
    for (int w = 0; w < SEG_WORDS; w++)
      phv.word_v[w] = phv.wib_v && (raw_len9 >= 9'(HDR_BYTES + 8*(w+1)));
  end

  assign phv_valid = ext_go;

  a_frame_fits : assert property (@(posedge clk) disable iff (!rst_n)
                                  fire |-> pos < 16'(MAX_FRAME_BYTES + META_BYTES + RH_BYTES));
endmodule
