// tb_checkpoint_table: entries keyed on is_recirc, pass count and expected
// sample values count exactly the passes that match them. A directed round
// uses one entry per kind of key; random rounds program any mix of keys and
// invalid entries. The hit vector is compared with a reference every cycle,
// the counters at the end of each round; rewriting an entry must clear its
// counter and an invalid entry must never count.
module tb_checkpoint_table;
  import dune_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cp_we, in_valid, is_recirc;
  logic [1:0] cp_addr, rd_addr;
  logic [63:0] cp_wdata;
  logic [31:0] rd_count;
  logic [7:0] recirc_cnt;
  adc_vec_t adc;
  logic [SEG_ADCS-1:0] adc_v;
  logic [3:0] hit;
  checkpoint_table dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int a, chk_entry_t e);
    @(negedge clk); cp_we = 1; cp_addr = 2'(a); cp_wdata = e;
    @(negedge clk); cp_we = 0;
  endtask

  int exp_cnt [4];
  chk_entry_t ent [4];

  // reference match of entry e against the current inputs
  function automatic bit ref_hit(int e);
    if (!ent[e].valid || ent[e].is_recirc != is_recirc) return 0;
    if (ent[e].cnt_en && ent[e].cnt != recirc_cnt) return 0;
    if (ent[e].adc_en && !(ent[e].adc_idx < SEG_ADCS && adc_v[ent[e].adc_idx]
                           && adc[ent[e].adc_idx][13:0] == ent[e].adc_value)) return 0;
    return 1;
  endfunction

  // one round: program the given entries, apply random passes, check the
  // hit vector every cycle and the counters at the end
  task automatic round(int passes);
    for (int a = 0; a < 4; a++) wr(a, ent[a]);
    exp_cnt = '{0, 0, 0, 0};
    for (int t = 0; t < passes; t++) begin
      bit ok;
      @(negedge clk);
      is_recirc = $urandom_range(0, 1); recirc_cnt = 8'($urandom_range(0, 5));
      for (int k = 0; k < SEG_ADCS; k++) adc[k] = 16'($urandom_range(0, 16383));
      adc_v = '1;
      for (int a = 0; a < 4; a++) if (ent[a].adc_en && ent[a].adc_idx < SEG_ADCS) begin
        if ($urandom_range(0, 2) == 0) adc[ent[a].adc_idx] = {2'b00, ent[a].adc_value};
        if ($urandom_range(0, 3) == 0) adc_v[ent[a].adc_idx] = 1'b0;
      end
      in_valid = ($urandom_range(0, 4) != 0);
      #1 ok = 1;
      for (int a = 0; a < 4; a++) begin
        if (hit[a] != ref_hit(a)) ok = 0;
        if (in_valid && ref_hit(a)) exp_cnt[a]++;
      end
      check(ok, $sformatf("hit vector %b", hit));
    end
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    for (int a = 0; a < 4; a++) begin
      rd_addr = 2'(a); #1;
      check(rd_count == 32'(exp_cnt[a]), $sformatf("entry %0d count %0d exp %0d", a, rd_count, exp_cnt[a]));
    end
  endtask

  initial begin
    chk_entry_t e;
    cp_we = 0; cp_addr = 0; cp_wdata = 0; rd_addr = 0; in_valid = 0; is_recirc = 0;
    recirc_cnt = 0; adc = '0; adc_v = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    // directed round: one entry per kind of key
    e = '0; e.valid = 1; e.is_recirc = 1;                               ent[0] = e;
    e = '0; e.valid = 1; e.is_recirc = 0;                               ent[1] = e;
    e = '0; e.valid = 1; e.is_recirc = 1; e.cnt_en = 1; e.cnt = 8'd3;   ent[2] = e;
    e = '0; e.valid = 1; e.is_recirc = 1; e.adc_en = 1; e.adc_idx = 7'd17;
    e.adc_value = 14'h155;                                              ent[3] = e;
    round(300);
    check(exp_cnt[3] > 0 && exp_cnt[2] > 0, "value and count keys exercised");
    // random rounds: any combination of keys, including invalid entries
    for (int r = 0; r < 20; r++) begin
      for (int a = 0; a < 4; a++) begin
        e = '0;
        e.valid = ($urandom_range(0, 5) != 0); e.is_recirc = $urandom_range(0, 1);
        e.cnt_en = $urandom_range(0, 1); e.cnt = 8'($urandom_range(0, 5));
        e.adc_en = $urandom_range(0, 1); e.adc_idx = 7'($urandom_range(0, SEG_ADCS - 1));
        e.adc_value = 14'($urandom);
        ent[a] = e;
      end
      round(100);
    end
    e = '0; e.valid = 1; e.is_recirc = 1; wr(0, e);
    @(negedge clk); is_recirc = 1; in_valid = 1; repeat (5) @(negedge clk); in_valid = 0;
    rd_addr = 0; #1;
    check(rd_count == 5, "five matching passes counted");
    wr(0, e);
    rd_addr = 0; #1;
    check(rd_count == 0, "writing an entry clears its counter");
    e = '0; wr(1, e);
    @(negedge clk); is_recirc = 0; in_valid = 1; @(negedge clk); in_valid = 0;
    rd_addr = 1; #1;
    check(rd_count == 0, "invalid entry does not count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
