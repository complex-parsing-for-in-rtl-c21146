// dune_parser_top: complete parser for DUNE detector frames, built as a
// switch-style ingress pipeline with recirculation.
//
// Data path, one frame pass at a time:
//   NET_PORTS network inputs / recirculation
//   --> ingress_port_merge (16-byte metadata prefix)
//   --> ingress_parser (header window to PHV, rest of frame to body buffer)
//   --> reverse_stage x3 + daq_wib_convert      (stage 1: byte reversal,
//                                                 96 ADC samples, DAQ/WIB)
//   --> chunk_processor + recirc_control        (stage 2: debug values,
//                                                 recirculate? decision)
//   --> checkpoint 1 (all passes), checkpoint 2 (recirculating passes),
//       forwarding_table (final passes)         (stage 3)
//   --> ingress_deparser (+ body buffer) --> traffic_manager
//   --> egress stream, or recirculation buffer back to the port merge.
// A pass processes one 21-word waveform segment. On a recirculating pass the
// deparser drops that segment and adds a recirculation header with the next
// pass count, so the next pass sees the next 168 bytes of waveform; after
// `depth` recirculations (control-plane register) the frame leaves with its
// original headers, a header of the last segment's 96 samples as 16-bit
// big-endian values, the last segment and the rest of the frame.
// The parse results of every pass (converted DAQ/WIB headers and the 96
// samples) are also presented on the res_* outputs in the cycle res_valid
// is high, for logic placed after the parser.
//
// Control plane: cp_we writes the table selected by cp_table (cp_table_e) at
// cp_addr with cp_wdata; cp_rd_table/cp_rd_addr select a 32-bit read value
// on cp_rd_data: checkpoint counters (CP_CHK1, CP_CHK2), the depth
// (CP_RECIRC) or statistics (CP_STATS: 0 forwarded, 1 recirculated,
// 2 dropped frames, 3 cycles network frames waited (summed over the network
// inputs), 4 network frames,
// 5 recirculated frames admitted).
// Streams are valid/ready with 8-byte beats (dune_pkg::beat_t). Frames are
// handled one at a time from parser to deparser; the frame body streams
// through a FIFO while its header vector crosses the three stages.
// Some outputs of the blocks are left unconnected here: the byte-reversed
// words of the reverse stages, the checkpoint hit vectors and the FIFO fill
// levels are there for logic or probes added after the parser.
// The block structure follows the design description; the stream width,
// buffer sizes, flow control and table sizes are this design's choices.
module dune_parser_top
  import dune_pkg::*;
#(
  parameter int    NET_PORTS     = 2,
  parameter port_t MAC_PORT      = 9'd0,
  parameter port_t RECIRC_PORT   = 9'd68,
  parameter int    FWD_ENTRIES   = 16,
  parameter int    CHK_ENTRIES   = 4,
  parameter int    CHUNK_ENTRIES = 8,
  parameter int    BODY_DEPTH    = MAX_FRAME_BEATS,
  parameter int    RECIRC_DEPTH  = 2 * MAX_FRAME_BEATS
) (
  input  logic                clk,
  input  logic                rst_n,
  // network ingress
  input  beat_t [NET_PORTS-1:0] mac_beat,
  input  logic  [NET_PORTS-1:0] mac_valid,
  output logic  [NET_PORTS-1:0] mac_ready,
  // network egress
  output beat_t               eg_beat,
  output logic                eg_valid,
  input  logic                eg_ready,
  output port_t               eg_port,
  // control plane
  input  logic                cp_we,
  input  cp_table_e           cp_table,
  input  logic [7:0]          cp_addr,
  input  logic [63:0]         cp_wdata,
  input  cp_table_e           cp_rd_table,
  input  logic [7:0]          cp_rd_addr,
  output logic [31:0]         cp_rd_data,
  // per-pass parse results
  output logic                res_valid,
  output logic                res_dune,
  output logic [7:0]          res_recirc_cnt,
  output daq_hdr_t            res_daq,
  output wib_hdr_t            res_wib,
  output adc_vec_t            res_adc,
  output logic [SEG_ADCS-1:0] res_adc_v
);
  localparam int FA = $clog2(FWD_ENTRIES);
  localparam int CA = $clog2(CHK_ENTRIES);
  localparam int KA = $clog2(CHUNK_ENTRIES);

  // ------------------------------------------------------------ ingress
  beat_t pm_beat, rc_beat, body_in, body_out, dp_beat;
  logic  pm_valid, pm_ready, rc_valid, rc_ready;
  logic  body_in_valid, body_in_ready, body_out_valid, body_out_ready;
  logic  dp_valid, dp_ready, dp_recirc, dp_drop, dp_idle, pass_done, frame_exit;
  port_t dp_port;
  logic [31:0] mac_wait, n_mac, n_rc, n_fwd, n_recirc, n_drop;
  logic [$clog2(BODY_DEPTH):0] body_count, body_free;

  ingress_port_merge #(.NET_PORTS(NET_PORTS), .MAC_PORT(MAC_PORT), .RECIRC_PORT(RECIRC_PORT),
                       .LOOP_FRAMES(RECIRC_DEPTH / MAX_FRAME_BEATS)) u_merge (
    .clk, .rst_n,
    .mac_beat, .mac_valid, .mac_ready,
    .rc_beat, .rc_valid, .rc_ready,
    .frame_exit,
    .out_beat(pm_beat), .out_valid(pm_valid), .out_ready(pm_ready),
    .mac_wait_cycles(mac_wait), .n_mac_frames(n_mac), .n_rc_frames(n_rc)
  );

  phv_t phv0;
  logic phv0_valid;

  ingress_parser #(.RECIRC_PORT(RECIRC_PORT)) u_parser (
    .clk, .rst_n,
    .in_beat(pm_beat), .in_valid(pm_valid), .in_ready(pm_ready),
    .start_ok(dp_idle),
    .phv(phv0), .phv_valid(phv0_valid),
    .body_beat(body_in), .body_valid(body_in_valid), .body_ready(body_in_ready),
    .pass_done
  );

  stream_fifo #(.DEPTH(BODY_DEPTH)) u_body (
    .clk, .rst_n,
    .in_beat(body_in), .in_valid(body_in_valid), .in_ready(body_in_ready),
    .out_beat(body_out), .out_valid(body_out_valid), .out_ready(body_out_ready),
    .count(body_count), .free(body_free)
  );

  // ------------------------------------------------------------ stage 1
  phv_t                       phv1, phv2, phv3;
  logic                       v2, v3;
  logic [NUM_REV-1:0]         rev_valid;
  logic [SEG_WORDS-1:0][63:0] rev_word;
  logic [SEG_WORDS-1:0]       rev_word_v;
  adc_vec_t                   rev_adc;
  logic [SEG_ADCS-1:0]        rev_adc_v;
  logic                       cv_valid, dune1;
  daq_hdr_t                   daq1;
  wib_hdr_t                   wib1;

  for (genvar g = 0; g < NUM_REV; g++) begin : g_rev
    reverse_stage #(.WORDS(STAGE_WORDS)) u_rev (
      .clk, .rst_n,
      .in_valid  (phv0_valid),
      .in_word   (phv0.seg_raw[g*STAGE_WORDS +: STAGE_WORDS]),
      .in_word_v (phv0.word_v[g*STAGE_WORDS +: STAGE_WORDS]),
      .out_valid (rev_valid[g]),
      .out_word  (rev_word[g*STAGE_WORDS +: STAGE_WORDS]),
      .out_word_v(rev_word_v[g*STAGE_WORDS +: STAGE_WORDS]),
      .out_adc   (rev_adc[g*STAGE_ADCS +: STAGE_ADCS]),
      .out_adc_v (rev_adc_v[g*STAGE_ADCS +: STAGE_ADCS])
    );
  end

  daq_wib_convert u_conv (
    .clk, .rst_n,
    .in_valid(phv0_valid),
    .daq_raw(phv0.daq_raw), .wib_raw(phv0.wib_raw),
    .daq_v(phv0.daq_v), .wib_v(phv0.wib_v),
    .out_valid(cv_valid), .daq(daq1), .wib(wib1), .dune(dune1)
  );

  // ------------------------------------------------------------ stage 2
  logic     ck_valid, rctl_valid, recirc2;
  logic [7:0] next_cnt2, depth;
  adc_vec_t adc2;
  logic [SEG_ADCS-1:0] adc2_v;
  logic     dune2;
  daq_hdr_t daq2;
  wib_hdr_t wib2;

  chunk_processor #(.ENTRIES(CHUNK_ENTRIES)) u_chunk (
    .clk, .rst_n,
    .cp_we(cp_we && cp_table == CP_CHUNK), .cp_addr(cp_addr[KA-1:0]), .cp_wdata,
    .in_valid(cv_valid), .recirc_cnt(phv1.recirc_cnt),
    .in_adc(rev_adc), .in_adc_v(rev_adc_v),
    .out_valid(ck_valid), .out_adc(adc2), .out_adc_v(adc2_v)
  );

  recirc_control u_rctl (
    .clk, .rst_n,
    .cp_we(cp_we && cp_table == CP_RECIRC), .cp_wdata, .depth,
    .in_valid(cv_valid), .dune(dune1), .recirc_cnt(phv1.recirc_cnt), .more(phv1.more),
    .out_valid(rctl_valid), .recirc(recirc2), .next_cnt(next_cnt2)
  );

  // ------------------------------------------------------------ stage 3
  logic [CHK_ENTRIES-1:0] hit1, hit2;
  logic [31:0]            chk1_cnt, chk2_cnt;
  logic                   fwd_valid, fwd_hit;
  port_t                  fwd_port;
  adc_vec_t               adc3;
  logic [SEG_ADCS-1:0]    adc3_v;
  logic                   recirc3;
  logic [7:0]             next_cnt3;

  checkpoint_table #(.ENTRIES(CHK_ENTRIES)) u_chk1 (
    .clk, .rst_n,
    .cp_we(cp_we && cp_table == CP_CHK1), .cp_addr(cp_addr[CA-1:0]), .cp_wdata,
    .rd_addr(cp_rd_addr[CA-1:0]), .rd_count(chk1_cnt),
    .in_valid(v2), .is_recirc(phv2.is_recirc), .recirc_cnt(phv2.recirc_cnt),
    .adc(adc2), .adc_v(adc2_v), .hit(hit1)
  );

  checkpoint_table #(.ENTRIES(CHK_ENTRIES)) u_chk2 (
    .clk, .rst_n,
    .cp_we(cp_we && cp_table == CP_CHK2), .cp_addr(cp_addr[CA-1:0]), .cp_wdata,
    .rd_addr(cp_rd_addr[CA-1:0]), .rd_count(chk2_cnt),
    .in_valid(v2 && recirc2), .is_recirc(phv2.is_recirc), .recirc_cnt(phv2.recirc_cnt),
    .adc(adc2), .adc_v(adc2_v), .hit(hit2)
  );

  forwarding_table #(.ENTRIES(FWD_ENTRIES)) u_fwd (
    .clk, .rst_n,
    .cp_we(cp_we && cp_table == CP_FWD), .cp_addr(cp_addr[FA-1:0]), .cp_wdata,
    .in_valid(v2 && !recirc2), .key_v(phv2.ipv4_v), .dst_ip(phv2.ipv4.dst),
    .out_valid(fwd_valid), .out_hit(fwd_hit), .out_port(fwd_port)
  );

  // Header vector and results travel alongside the stage modules.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phv1 <= '0; phv2 <= '0; phv3 <= '0;
      v2 <= 1'b0; v3 <= 1'b0;
      dune2 <= 1'b0; daq2 <= '0; wib2 <= '0;
      adc3 <= '0; adc3_v <= '0; recirc3 <= 1'b0; next_cnt3 <= '0;
    end else begin
      v2 <= ck_valid && rctl_valid;
      v3 <= v2;
      if (phv0_valid) phv1 <= phv0;
      if (cv_valid) begin
        phv2  <= phv1;
        dune2 <= dune1;
        daq2  <= daq1;
        wib2  <= wib1;
      end
      if (v2) begin
        phv3      <= phv2;
        adc3      <= adc2;
        adc3_v    <= adc2_v;
        recirc3   <= recirc2;
        next_cnt3 <= next_cnt2;
      end
    end
  end

  assign res_valid      = v2;
  assign res_dune       = dune2;
  assign res_recirc_cnt = phv2.recirc_cnt;
  assign res_daq        = daq2;
  assign res_wib        = wib2;
  assign res_adc        = adc2;
  assign res_adc_v      = adc2_v;

  // ------------------------------------------------------------ deparser
  ingress_deparser u_deparser (
    .clk, .rst_n,
    .in_valid(v3), .in_phv(phv3), .in_adc(adc3), .in_adc_v(adc3_v),
    .in_recirc(recirc3), .in_next_cnt(next_cnt3),
    .in_drop(!recirc3 && !(fwd_valid && fwd_hit)),
    .in_port(recirc3 ? RECIRC_PORT : fwd_port),
    .idle(dp_idle),
    .body_beat(body_out), .body_valid(body_out_valid), .body_ready(body_out_ready),
    .out_beat(dp_beat), .out_valid(dp_valid), .out_ready(dp_ready),
    .out_recirc(dp_recirc), .out_drop(dp_drop), .out_port(dp_port),
    .pass_done
  );

  traffic_manager #(.RECIRC_DEPTH(RECIRC_DEPTH)) u_tm (
    .clk, .rst_n,
    .in_beat(dp_beat), .in_valid(dp_valid), .in_ready(dp_ready),
    .in_recirc(dp_recirc), .in_drop(dp_drop), .in_port(dp_port),
    .eg_beat, .eg_valid, .eg_ready, .eg_port,
    .rc_beat, .rc_valid, .rc_ready,
    .frame_exit,
    .n_fwd, .n_recirc, .n_drop
  );

  // ------------------------------------------------------------ readback
  always_comb begin
    case (cp_rd_table)
      CP_RECIRC: cp_rd_data = {24'd0, depth};
      CP_CHK1:   cp_rd_data = chk1_cnt;
      CP_CHK2:   cp_rd_data = chk2_cnt;
      CP_STATS:  case (cp_rd_addr)
                   8'd0:    cp_rd_data = n_fwd;
                   8'd1:    cp_rd_data = n_recirc;
                   8'd2:    cp_rd_data = n_drop;
                   8'd3:    cp_rd_data = mac_wait;
                   8'd4:    cp_rd_data = n_mac;
                   8'd5:    cp_rd_data = n_rc;
                   default: cp_rd_data = 32'd0;
                 endcase
      default:   cp_rd_data = 32'd0;
    endcase
  end
endmodule
