// tb_chunk_processor: samples pass unchanged without entries; entries replace
// the chosen sample (and mark it valid) only on the pass count they name.
module tb_chunk_processor;
  import dune_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cp_we, in_valid, out_valid;
  logic [2:0] cp_addr;
  logic [63:0] cp_wdata;
  logic [7:0] recirc_cnt;
  adc_vec_t in_adc, out_adc;
  logic [SEG_ADCS-1:0] in_adc_v, out_adc_v;
  chunk_processor dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(int a, int cnt, int idx, int val);
    chunk_entry_t e;
    e = '0; e.valid = 1; e.cnt = 8'(cnt); e.idx = 7'(idx); e.value = 14'(val);
    @(negedge clk); cp_we = 1; cp_addr = 3'(a); cp_wdata = e;
    @(negedge clk); cp_we = 0;
  endtask

  bit written = 0;
  task automatic pass(int cnt);
    adc_vec_t exp_a;
    logic [SEG_ADCS-1:0] exp_v;
    @(negedge clk);
    for (int k = 0; k < SEG_ADCS; k++) in_adc[k] = 16'($urandom_range(0, 16383));
    in_adc_v = {$urandom, $urandom, $urandom};
    recirc_cnt = 8'(cnt); in_valid = 1;
    exp_a = in_adc; exp_v = in_adc_v;
    if (written && cnt == 2) begin exp_a[5] = 16'h1234; exp_v[5] = 1; exp_a[95] = 16'h3fff; exp_v[95] = 1; end
    if (written && cnt == 7) begin exp_a[0] = 16'h0001; exp_v[0] = 1; end
    @(negedge clk); in_valid = 0;
    check(out_valid, "latency one cycle");
    check(out_adc == exp_a, $sformatf("samples on pass %0d", cnt));
    check(out_adc_v == exp_v, $sformatf("sample valid bits on pass %0d", cnt));
  endtask

  initial begin
    cp_we = 0; cp_addr = 0; cp_wdata = 0; in_valid = 0; recirc_cnt = 0; in_adc = '0; in_adc_v = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    pass(0); pass(2);                      // no entries: unchanged
    wr(0, 2, 5, 14'h1234);
    wr(4, 2, 95, 14'h3fff);
    wr(7, 7, 0, 14'h0001);
    written = 1;
    for (int c = 0; c < 10; c++) pass(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
