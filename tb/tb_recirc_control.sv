// tb_recirc_control: the recirculate decision for every pass count around
// several depths, for DUNE and other frames, with and without bytes left.
module tb_recirc_control;
  import dune_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cp_we, in_valid, dune, more, out_valid, recirc;
  logic [63:0] cp_wdata;
  logic [7:0] depth, recirc_cnt, next_cnt;
  recirc_control dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int depths [4] = '{0, 1, 10, 42};
    cp_we = 0; cp_wdata = 0; in_valid = 0; dune = 0; more = 0; recirc_cnt = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    check(depth == 0, "depth 0 after reset");
    foreach (depths[d]) begin
      @(negedge clk); cp_we = 1; cp_wdata = 64'(depths[d]);
      @(negedge clk); cp_we = 0;
      check(depth == 8'(depths[d]), "depth written");
      for (int c = 0; c < 45; c++) begin
        for (int m = 0; m < 4; m++) begin
          @(negedge clk);
          dune = m[0]; more = m[1]; recirc_cnt = 8'(c); in_valid = 1;
          @(negedge clk); in_valid = 0;
          check(out_valid, "latency one cycle");
          check(recirc == (m[0] && m[1] && c < depths[d]),
                $sformatf("decision depth %0d cnt %0d dune %0d more %0d", depths[d], c, m[0], m[1]));
          check(next_cnt == 8'(c + 1), "next count");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
