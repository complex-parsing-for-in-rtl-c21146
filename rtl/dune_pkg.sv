// dune_pkg: constants and types shared by the DUNE frame parser pipeline.
//
// The pipeline parses Jumbo Ethernet frames sent by the Warm Interface Boards
// (WIB) of the DUNE detector: Ethernet / IPv4 / UDP in network byte order,
// then a 128-bit DAQ header, a 128-bit WIB header and a 7,168-byte waveform of
// packed 14-bit ADC samples, all of it little-endian in 64-bit words. A pass
// through the pipeline handles one 21-word (168-byte) segment of the waveform;
// deeper segments are reached by recirculating the frame with the processed
// segment removed.
//
// Followed from the design description: 16 bytes (8 intrinsic metadata, 8 port
// metadata) prepended to every frame entering the parser, the header order and
// sizes, 21-word segments processed as three groups of 7 words (32 ADC values
// each), 14-bit ADC values widened to 16-bit fields, the field names of the
// DAQ and WIB headers.
// Own choices: the stream width (8 bytes per beat), the 1-byte recirculation
// header, the bit widths of the DAQ/WIB header fields (taken from the DUNE
// WIB Ethernet format), the intrinsic metadata layout (Tofino layout), and the
// 64-bit control-plane entry encodings below.
package dune_pkg;

  // ---------------------------------------------------------------- stream
  localparam int BEAT_BYTES = 8;                 // bytes per stream beat
  localparam int BEAT_BITS  = 8 * BEAT_BYTES;

  // data[8*i +: 8] is the i-th byte on the wire; keep[i] marks it valid.
  typedef struct packed {
    logic [BEAT_BITS-1:0]  data;
    logic [BEAT_BYTES-1:0] keep;
    logic                  last;
  } beat_t;

  // ---------------------------------------------------------------- sizes
  localparam int META_BYTES    = 16;   // intrinsic (8) + port metadata (8)
  localparam int RH_BYTES      = 1;    // recirculation header: pass count
  localparam int ETH_BYTES     = 14;
  localparam int IPV4_BYTES    = 20;
  localparam int UDP_BYTES     = 8;
  localparam int DAQ_BYTES     = 16;
  localparam int WIB_BYTES     = 16;
  localparam int HDR_BYTES     = ETH_BYTES + IPV4_BYTES + UDP_BYTES
                               + DAQ_BYTES + WIB_BYTES;           // 74
  localparam int WORD_BYTES    = 8;
  localparam int SEG_WORDS     = 21;   // window: 21 x 64-bit words per pass
  localparam int SEG_BYTES     = SEG_WORDS * WORD_BYTES;           // 168
  localparam int STAGE_WORDS   = 7;    // words handled by one Reverse_stage
  localparam int NUM_REV       = SEG_WORDS / STAGE_WORDS;          // 3
  localparam int ADC_BITS      = 14;
  localparam int STAGE_ADCS    = STAGE_WORDS * 64 / ADC_BITS;      // 32
  localparam int SEG_ADCS      = NUM_REV * STAGE_ADCS;             // 96
  localparam int ADC_HDR_BYTES = 2 * SEG_ADCS;                     // 192
  localparam int RAW_MAX       = HDR_BYTES + SEG_BYTES;            // 242
  localparam int PRE_MAX       = META_BYTES + RH_BYTES + RAW_MAX;  // 259
  localparam int PAYLOAD_BYTES = 7168; // waveform bytes in a DUNE frame
  localparam int CHANNELS      = 64;   // ADC channels per time sample

  // Largest frame the buffers are sized for, in bytes and beats.
  localparam int MAX_FRAME_BYTES = 8192;
  localparam int MAX_FRAME_BEATS = MAX_FRAME_BYTES / BEAT_BYTES;

  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IPPROTO_UDP    = 8'd17;

  typedef logic [8:0] port_t;

  // ---------------------------------------------------------------- headers
  typedef struct packed {
    logic [47:0] dst;
    logic [47:0] src;
    logic [15:0] ethertype;
  } eth_t;

  typedef struct packed {
    logic [3:0]  version;
    logic [3:0]  ihl;
    logic [7:0]  tos;
    logic [15:0] total_len;
    logic [15:0] id;
    logic [2:0]  flags;
    logic [12:0] frag_off;
    logic [7:0]  ttl;
    logic [7:0]  protocol;
    logic [15:0] checksum;
    logic [31:0] src;
    logic [31:0] dst;
  } ipv4_t;

  typedef struct packed {
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [15:0] length;
    logic [15:0] checksum;
  } udp_t;

  // DAQ header after conversion to big-endian: first 64-bit word, then the
  // timestamp word. Within a word the first field listed is the most
  // significant.
  typedef struct packed {
    logic [5:0]  version;
    logic [5:0]  det_id;
    logic [9:0]  crate_id;
    logic [3:0]  slot_id;
    logic [7:0]  stream_id;
    logic [5:0]  reserved;
    logic [11:0] seq_id;
    logic [11:0] block_length;
    logic [63:0] timestamp;
  } daq_hdr_t;

  typedef struct packed {
    logic       cd;
    logic       crc_err;
    logic       link_valid;
    logic       lol;
    logic       wib_sync;
    logic [1:0] femb_sync;
    logic       pulser;
    logic       calibration;
    logic       ready;
  } wib_flags_t;

  typedef struct packed {
    logic [14:0] timestamp0;
    logic        pad0;
    logic [14:0] timestamp1;
    logic        pad1;
    wib_flags_t  flags;
    logic [7:0]  context_id;
    logic [5:0]  version;
    logic [7:0]  channel;
    logic [63:0] extension;
  } wib_hdr_t;

  // ---------------------------------------------------------------- PHV
  // Packet header vector produced by the ingress parser for one pass.
  // raw[0] is the first Ethernet byte; 64-bit words are kept as extracted,
  // i.e. the first byte on the wire is the most significant byte.
  typedef struct packed {
    logic                         is_recirc;
    logic [7:0]                   recirc_cnt;
    port_t                        ingress_port;
    logic [47:0]                  ingress_tstamp;
    // packet occupancy vector: header validity bits
    logic                         eth_v;
    logic                         ipv4_v;
    logic                         udp_v;
    logic                         daq_v;
    logic                         wib_v;
    logic [SEG_WORDS-1:0]         word_v;
    logic                         more;      // frame continues past prefix
    eth_t                         eth;
    ipv4_t                        ipv4;
    udp_t                         udp;
    logic [1:0][63:0]             daq_raw;   // [0] = first word
    logic [1:0][63:0]             wib_raw;
    logic [SEG_WORDS-1:0][63:0]   seg_raw;
    logic [7:0]                   raw_len;   // bytes in raw[]
    logic [RAW_MAX-1:0][7:0]      raw;
  } phv_t;

  typedef logic [SEG_ADCS-1:0][15:0] adc_vec_t;

  // ------------------------------------------------ control-plane entries
  typedef enum logic [2:0] {
    CP_RECIRC = 3'd0,   // recirc_control_table: depth
    CP_FWD    = 3'd1,   // forwarding table entry
    CP_CHUNK  = 3'd2,   // chunk processor injection entry
    CP_CHK1   = 3'd3,   // checkpoint 1 entry / counter
    CP_CHK2   = 3'd4,   // checkpoint 2 entry / counter
    CP_STATS  = 3'd5    // traffic statistics (read only)
  } cp_table_e;

  typedef struct packed {
    logic        valid;
    logic [21:0] unused;
    port_t       port;
    logic [31:0] dst_ip;
  } fwd_entry_t;

  typedef struct packed {
    logic        valid;
    logic [32:0] unused;
    logic [13:0] value;
    logic        unused2;
    logic [6:0]  idx;
    logic [7:0]  cnt;
  } chunk_entry_t;

  typedef struct packed {
    logic        valid;
    logic [16:0] unused;
    logic [13:0] adc_value;
    logic        unused2;
    logic [6:0]  adc_idx;
    logic [6:0]  unused3;
    logic        adc_en;
    logic [7:0]  cnt;
    logic [5:0]  unused4;
    logic        cnt_en;
    logic        is_recirc;
  } chk_entry_t;

endpackage
