// checkpoint_table: match table with a hit counter per entry, used to check
// at run time that the recirculation logic and the ADC extraction work.
//
// The control plane writes up to ENTRIES entries (chk_entry_t): the value of
// the is_recirc flag to match, optionally a pass count, and optionally an ADC
// sample index with its expected 14-bit value. Whenever a pass is applied
// (in_valid) every valid entry whose key matches increments its own 32-bit
// counter; the control plane polls the counters through rd_addr/rd_count.
// Writing an entry clears its counter. Two instances are used: Checkpoint 1
// on every pass and Checkpoint 2 on passes that recirculate.
//
// Timing: counters update on the cycle after in_valid; rd_count is
// combinational. Matching on is_recirc and on expected ADC values follows the
// design description; the entry format and optional pass-count key are this
// design's choice.
module checkpoint_table
  import dune_pkg::*;
#(
  parameter int ENTRIES = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cp_we,
  input  logic [$clog2(ENTRIES)-1:0] cp_addr,
  input  logic [63:0]                cp_wdata,
  input  logic [$clog2(ENTRIES)-1:0] rd_addr,
  output logic [31:0]                rd_count,
  input  logic                       in_valid,
  input  logic                       is_recirc,
  input  logic [7:0]                 recirc_cnt,
  input  adc_vec_t                   adc,
  input  logic [SEG_ADCS-1:0]        adc_v,
  output logic [ENTRIES-1:0]         hit
);
  chk_entry_t  tbl [ENTRIES];
  logic [31:0] cnt [ENTRIES];

  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      hit[e] = tbl[e].valid && (tbl[e].is_recirc == is_recirc)
            && (!tbl[e].cnt_en || tbl[e].cnt == recirc_cnt)
            && (!tbl[e].adc_en ||
                (32'(tbl[e].adc_idx) < SEG_ADCS && adc_v[tbl[e].adc_idx]
                 && adc[tbl[e].adc_idx][13:0] == tbl[e].adc_value));
    end
  end

  assign rd_count = cnt[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        tbl[e] <= '0;
        cnt[e] <= '0;
      end
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (cp_we && cp_addr == e[$clog2(ENTRIES)-1:0]) begin
          tbl[e] <= chk_entry_t'(cp_wdata);
          cnt[e] <= '0;
        end else if (in_valid && hit[e]) begin
          cnt[e] <= cnt[e] + 32'd1;
        end
      end
    end
  end
endmodule
