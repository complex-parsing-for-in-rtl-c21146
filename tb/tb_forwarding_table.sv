// tb_forwarding_table: exact-match lookups of IPv4 destinations: hits give
// the written port, misses, invalid entries and absent keys miss, the lowest
// matching entry wins, results appear one cycle after the request.
module tb_forwarding_table;
  import dune_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cp_we, in_valid, key_v, out_valid, out_hit;
  logic [3:0] cp_addr;
  logic [63:0] cp_wdata;
  logic [31:0] dst_ip;
  port_t out_port;
  forwarding_table dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] ip  [16];
  int          prt [16];
  bit          vld [16];

  task automatic wr(int a, bit v, logic [31:0] addr, int p);
    fwd_entry_t e;
    e = '0; e.valid = v; e.dst_ip = addr; e.port = 9'(p);
    @(negedge clk); cp_we = 1; cp_addr = 4'(a); cp_wdata = e;
    @(negedge clk); cp_we = 0;
    ip[a] = addr; prt[a] = p; vld[a] = v;
  endtask

  task automatic look(logic [31:0] a, bit kv);
    bit h = 0; int p = 0;
    for (int e = 15; e >= 0; e--) if (kv && vld[e] && ip[e] == a) begin h = 1; p = prt[e]; end
    @(negedge clk); dst_ip = a; key_v = kv; in_valid = 1;
    @(negedge clk); in_valid = 0;
    check(out_valid, "latency one cycle");
    check(out_hit == h, $sformatf("hit for %h", a));
    if (h) check(out_port == 9'(p), $sformatf("port for %h", a));
  endtask

  initial begin
    cp_we = 0; cp_addr = 0; cp_wdata = 0; in_valid = 0; key_v = 0; dst_ip = 0;
    for (int e = 0; e < 16; e++) begin ip[e] = 0; prt[e] = 0; vld[e] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    look(32'h0, 1);
    for (int e = 0; e < 16; e++) wr(e, e != 9, 32'h0a000000 + 32'(e), 100 + e);
    wr(12, 1, 32'h0a000003, 300);           // duplicate of entry 3: entry 3 wins
    for (int e = 0; e < 16; e++) look(32'h0a000000 + 32'(e), 1);
    look(32'h0a000005, 0);                   // no IPv4 header
    for (int t = 0; t < 50; t++) look($urandom, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
