// tb_daq_wib_convert: checks the DAQ and WIB header fields against slices of
// the headers' words read little-endian from the wire bytes.
module tb_daq_wib_convert;
  import dune_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid, daq_v, wib_v, dune;
  logic [1:0][63:0] daq_raw, wib_raw;
  daq_hdr_t daq;
  wib_hdr_t wib;
  daq_wib_convert dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  byte unsigned b [32];
  logic [63:0] d0, d1, w0, w1;
  initial begin
    in_valid = 0; daq_raw = '0; wib_raw = '0; daq_v = 0; wib_v = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      for (int i = 0; i < 32; i++) b[i] = 8'($urandom);
      for (int w = 0; w < 2; w++)
        for (int i = 0; i < 8; i++) begin
          daq_raw[w][8*(7-i) +: 8] = b[8*w + i];
          wib_raw[w][8*(7-i) +: 8] = b[16 + 8*w + i];
        end
      for (int i = 0; i < 8; i++) begin
        d0[8*i +: 8] = b[i];      d1[8*i +: 8] = b[8 + i];
        w0[8*i +: 8] = b[16 + i]; w1[8*i +: 8] = b[24 + i];
      end
      daq_v = (t % 4) != 3; wib_v = daq_v && ((t % 4) != 2);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "latency one cycle");
      check(dune == (daq_v && wib_v), "dune flag");
      if (daq_v) begin
        check(daq.block_length == d0[11:0] && daq.seq_id == d0[23:12]
              && daq.reserved == d0[29:24] && daq.stream_id == d0[37:30]
              && daq.slot_id == d0[41:38] && daq.crate_id == d0[51:42]
              && daq.det_id == d0[57:52] && daq.version == d0[63:58], "DAQ word 0 fields");
        check(daq.timestamp == d1, "DAQ timestamp");
      end else check(daq == '0, "absent DAQ header reads zero");
      if (wib_v) begin
        check(wib.channel == w0[7:0] && wib.version == w0[13:8]
              && wib.context_id == w0[21:14], "WIB channel/version/context");
        check(wib.flags.ready == w0[22] && wib.flags.calibration == w0[23]
              && wib.flags.pulser == w0[24] && wib.flags.femb_sync == w0[26:25]
              && wib.flags.wib_sync == w0[27] && wib.flags.lol == w0[28]
              && wib.flags.link_valid == w0[29] && wib.flags.crc_err == w0[30]
              && wib.flags.cd == w0[31], "WIB flags");
        check(wib.timestamp1 == w0[47:33] && wib.timestamp0 == w0[63:49], "WIB timestamps");
        check(wib.extension == w1, "WIB extension");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
