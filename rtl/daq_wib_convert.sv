// daq_wib_convert: turns the opaque little-endian DAQ and WIB headers into
// big-endian header fields.
//
// The parser extracts both 128-bit headers as raw bytes because its field
// extraction cannot reorder bytes. This block, part of the ingress control,
// reverses the byte order of each 64-bit word (the headers use 64-bit
// little-endian words) and slices the result into the DAQ fields (version,
// detector, crate, slot, stream, sequence id, block length, timestamp) and
// WIB fields (two cold-data timestamps, status flags, context, version,
// channel, extension data). It also checks the headers' plausibility for the
// rest of the pipeline: `dune` is high when both headers were present.
//
// Timing: one register stage, matching the reverse stages beside it.
// Field names follow the design description; the field widths and their bit
// positions follow the DUNE WIB Ethernet format and are this design's reading.
module daq_wib_convert
  import dune_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [1:0][63:0] daq_raw,
  input  logic [1:0][63:0] wib_raw,
  input  logic             daq_v,
  input  logic             wib_v,
  output logic             out_valid,
  output daq_hdr_t         daq,
  output wib_hdr_t         wib,
  output logic             dune
);
  function automatic logic [63:0] swap64(input logic [63:0] w);
    for (int b = 0; b < 8; b++) swap64[8*b +: 8] = w[8*(7-b) +: 8];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      daq       <= '0;
      wib       <= '0;
      dune      <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        daq  <= daq_v ? daq_hdr_t'({swap64(daq_raw[0]), swap64(daq_raw[1])}) : '0;
        wib  <= wib_v ? wib_hdr_t'({swap64(wib_raw[0]), swap64(wib_raw[1])}) : '0;
        dune <= daq_v && wib_v;
      end
    end
  end
endmodule
