// chunk_processor: run-time table that can replace extracted ADC values.
//
// Sits after the reverse stages and before the checkpoint tables. The control
// plane writes up to ENTRIES entries {valid, pass count, sample index, 14-bit
// value}; on a pass whose recirculation count equals an entry's count, the
// sample at that index (0..95 within the segment) is replaced by the entry's
// value and marked valid. With no valid entries the samples pass unchanged.
// This lets a developer create known ADC values at run time and see them
// counted by the checkpoint tables, as a debugging aid.
//
// Timing: one register stage. Control-plane writes (cp_we, cp_addr,
// cp_wdata as chunk_entry_t) take effect from the next cycle; all entries
// are invalid after reset. The entry count and format are this design's
// choice; the debugging role follows the design description.
module chunk_processor
  import dune_pkg::*;
#(
  parameter int ENTRIES = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cp_we,
  input  logic [$clog2(ENTRIES)-1:0] cp_addr,
  input  logic [63:0]                cp_wdata,
  input  logic                       in_valid,
  input  logic [7:0]                 recirc_cnt,
  input  adc_vec_t                   in_adc,
  input  logic [SEG_ADCS-1:0]        in_adc_v,
  output logic                       out_valid,
  output adc_vec_t                   out_adc,
  output logic [SEG_ADCS-1:0]        out_adc_v
);
  chunk_entry_t tbl [ENTRIES];
  adc_vec_t            adc;
  logic [SEG_ADCS-1:0] adc_v;

  always_comb begin
    adc   = in_adc;
    adc_v = in_adc_v;
    for (int e = 0; e < ENTRIES; e++) begin
      if (tbl[e].valid && tbl[e].cnt == recirc_cnt && 32'(tbl[e].idx) < SEG_ADCS) begin
        adc[tbl[e].idx]   = {2'b00, tbl[e].value};
        adc_v[tbl[e].idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) tbl[e] <= '0;
      out_valid <= 1'b0;
      out_adc   <= '0;
      out_adc_v <= '0;
    end else begin
      if (cp_we) tbl[cp_addr] <= chunk_entry_t'(cp_wdata);
      out_valid <= in_valid;
      if (in_valid) begin
        out_adc   <= adc;
        out_adc_v <= adc_v;
      end
    end
  end
endmodule
