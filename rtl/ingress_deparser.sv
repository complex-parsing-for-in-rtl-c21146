// ingress_deparser: rebuilds the frame that leaves a pass and streams it out
// with its routing decision.
//
// It latches the pass result (PHV, extracted ADC samples, decision) and
// serialises one of three layouts into a header buffer, then appends the
// frame body from the body buffer:
//   recirculate : recirculation header (next pass count, 1 byte), Ethernet,
//                 IPv4, UDP, DAQ, WIB as received; the processed segment is
//                 left out, so the next pass sees the next 168 bytes.
//   final, DUNE : Ethernet .. WIB as received, an ADC header of 96 16-bit
//                 big-endian samples (zero where a sample was not present),
//                 the processed segment as received, then the rest of the
//                 waveform.
//   other frame : the captured bytes unchanged.
// A byte_packer closes the gap between the header bytes and the body, whose
// first beat starts at an arbitrary lane. The output port fields
// (out_recirc, out_drop, out_port) are constant for the whole frame.
//
// Timing: header bytes go out at one beat per cycle, then the body at one
// beat per cycle. pass_done pulses one cycle after the last output beat is
// accepted; in_valid must only be pulsed when the deparser is idle.
// The layouts follow the design description (headers plus most recent
// segment, unparsed rest forwarded, samples emitted as big-endian 16-bit
// values); the position of the ADC header is this design's choice.
module ingress_deparser
  import dune_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  phv_t                in_phv,
  input  adc_vec_t            in_adc,
  input  logic [SEG_ADCS-1:0] in_adc_v,
  input  logic                in_recirc,
  input  logic [7:0]          in_next_cnt,
  input  logic                in_drop,
  input  port_t               in_port,
  output logic                idle,
  input  beat_t               body_beat,
  input  logic                body_valid,
  output logic                body_ready,
  output beat_t               out_beat,
  output logic                out_valid,
  input  logic                out_ready,
  output logic                out_recirc,
  output logic                out_drop,
  output port_t               out_port,
  output logic                pass_done
);
  localparam int HBUF    = RH_BYTES + HDR_BYTES + ADC_HDR_BYTES + SEG_BYTES; // 435
  localparam int W       = BEAT_BYTES;
  localparam int NW      = $clog2(W) + 1;

  typedef enum logic [1:0] {D_IDLE, D_HDR, D_BODY, D_END} state_e;
  state_e state;

  logic [HBUF-1:0][7:0] hbuf, hbuf_n;
  logic [9:0]           hlen, hlen_n, ptr;
  logic                 more_q;

  // ---------------------------------------------------- header layout
  always_comb begin
    hbuf_n = '0;
    if (in_recirc) begin
      hbuf_n[0] = in_next_cnt;
      for (int i = 0; i < HDR_BYTES; i++) hbuf_n[RH_BYTES + i] = in_phv.raw[i];
      hlen_n = 10'(RH_BYTES + HDR_BYTES);
    end else if (in_phv.wib_v) begin
      for (int i = 0; i < HDR_BYTES; i++) hbuf_n[i] = in_phv.raw[i];
      for (int k = 0; k < SEG_ADCS; k++) begin
        hbuf_n[HDR_BYTES + 2*k]     = in_adc_v[k] ? in_adc[k][15:8] : 8'h00;
        hbuf_n[HDR_BYTES + 2*k + 1] = in_adc_v[k] ? in_adc[k][7:0]  : 8'h00;
      end
      for (int i = 0; i < SEG_BYTES; i++)
        hbuf_n[HDR_BYTES + ADC_HDR_BYTES + i] = in_phv.raw[HDR_BYTES + i];
      hlen_n = 10'(in_phv.raw_len) + 10'(ADC_HDR_BYTES);
    end else begin
      for (int i = 0; i < RAW_MAX; i++) hbuf_n[i] = in_phv.raw[i];
      hlen_n = 10'(in_phv.raw_len);
    end
  end

  // ---------------------------------------------------- packer feed
  logic [BEAT_BITS-1:0] p_data;
  logic [NW-1:0]        p_lo, p_n;
  logic                 p_last, p_valid, p_ready;
  logic [9:0]           remain;

  assign remain = hlen - ptr;

  always_comb begin
    p_data = '0;
    p_lo   = '0;
    p_n    = '0;
    p_last = 1'b0;
    p_valid = 1'b0;
    body_ready = 1'b0;
    case (state)
      D_HDR: begin
        for (int i = 0; i < W; i++)
          if (32'(ptr) + i < HBUF) p_data[8*i +: 8] = hbuf[32'(ptr) + i];
        p_n     = (remain >= 10'(W)) ? NW'(W) : NW'(remain);
        p_last  = !more_q && (remain <= 10'(W));
        p_valid = 1'b1;
      end
      D_BODY: begin
        p_data = body_beat.data;
        for (int i = W - 1; i >= 0; i--) if (body_beat.keep[i]) p_lo = NW'(i);
        for (int i = 0; i < W; i++) p_n = p_n + NW'(body_beat.keep[i]);
        p_last     = body_beat.last;
        p_valid    = body_valid;
        body_ready = p_ready;
      end
      default: ;
    endcase
  end

  byte_packer u_pack (
    .clk, .rst_n,
    .in_data (p_data), .in_lo (p_lo), .in_n (p_n), .in_last (p_last),
    .in_valid(p_valid), .in_ready(p_ready),
    .out_beat, .out_valid, .out_ready
  );

  assign idle = (state == D_IDLE);

  always_ff @(posedge clk) begin
    if (state == D_IDLE && in_valid) hbuf <= hbuf_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= D_IDLE;
      hlen       <= '0;
      ptr        <= '0;
      more_q     <= 1'b0;
      out_recirc <= 1'b0;
      out_drop   <= 1'b0;
      out_port   <= '0;
      pass_done  <= 1'b0;
    end else begin
      pass_done <= 1'b0;
      case (state)
        D_IDLE: if (in_valid) begin
          hlen       <= hlen_n;
          ptr        <= '0;
          more_q     <= in_phv.more;
          out_recirc <= in_recirc;
          out_drop   <= in_drop;
          out_port   <= in_port;
          state      <= D_HDR;
        end
        D_HDR: if (p_ready) begin
          ptr <= ptr + 10'(W);
          if (remain <= 10'(W)) state <= more_q ? D_BODY : D_END;
        end
        D_BODY: if (body_valid && p_ready && body_beat.last) state <= D_END;
        D_END: if (out_valid && out_ready && out_beat.last) begin
          pass_done <= 1'b1;
          state     <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  a_start_idle : assert property (@(posedge clk) disable iff (!rst_n)
                                  in_valid |-> state == D_IDLE);
endmodule
