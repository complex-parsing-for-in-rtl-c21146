// tb_ingress_parser: frames with the 16-byte metadata prefix (and the
// recirculation header when they come from the recirculation port) are
// parsed; every PHV field is compared with the bytes that were sent and the
// body output must carry exactly the bytes after the header window.
// Cases: full DUNE frame, recirculated frame, frame ending inside the
// segment, frame ending exactly at the window, short UDP frame, non-IPv4
// frame; random back-pressure on the body output.
module tb_ingress_parser;
  import dune_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  beat_t in_beat, body_beat;
  logic in_valid, in_ready, start_ok, phv_valid, body_valid, body_ready, pass_done;
  phv_t phv;
  ingress_parser dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  byte unsigned f [2048];   // frame as sent, with prefix
  int fl, base;
  byte unsigned body [$];
  phv_t got;
  bit got_phv, body_end;

  always @(negedge clk) body_ready <= ($urandom_range(0, 3) != 0);
  always @(negedge clk) if (rst_n) begin
    if (phv_valid) begin got = phv; got_phv = 1; end
    if (body_valid && body_ready) begin
      for (int l = 0; l < BEAT_BYTES; l++) if (body_beat.keep[l]) body.push_back(body_beat.data[8*l +: 8]);
      if (body_beat.last) body_end = 1;
    end
  end

  task automatic run(int len, bit rec, int cnt, bit ipv4);
    int i = 0, raw_len, exp_words;
    bit ok;
    logic [15:0] et;
    base = rec ? 17 : 16;
    fl = base + len;
    for (int k = 0; k < fl; k++) f[k] = 8'($urandom);
    f[0] = 8'(rec ? 0 : 0); f[1] = rec ? 8'd68 : 8'd3;
    if (rec) f[16] = 8'(cnt);
    f[base + 12] = 8'h08; f[base + 13] = ipv4 ? 8'h00 : 8'h06;
    f[base + 14] = 8'h45; f[base + 23] = 8'd17;
    body.delete(); got_phv = 0; body_end = 0;
    @(negedge clk);
    while (i < fl) begin
      for (int l = 0; l < BEAT_BYTES; l++) begin
        in_beat.data[8*l +: 8] = (i + l < fl) ? f[i + l] : 8'h00;
        in_beat.keep[l] = (i + l < fl);
      end
      in_beat.last = (i + BEAT_BYTES >= fl);
      in_valid = 1;
      do begin #1 ok = in_ready; @(negedge clk); end while (!ok);
      i += BEAT_BYTES;
    end
    in_valid = 0;
    raw_len = len < RAW_MAX ? len : RAW_MAX;
    if (len > RAW_MAX) while (!body_end) @(negedge clk);
    repeat (3) @(negedge clk);
    check(got_phv, "PHV produced");
    check(got.is_recirc == rec && got.recirc_cnt == 8'(rec ? cnt : 0), "recirculation fields");
    check(got.ingress_port == (rec ? 9'd68 : 9'd3), "ingress port");
    check(got.raw_len == 8'(raw_len), $sformatf("raw_len %0d exp %0d", got.raw_len, raw_len));
    check(got.more == (len > RAW_MAX), "more");
    for (int k = 0; k < raw_len; k++) if (got.raw[k] != f[base + k]) begin
      check(0, $sformatf("raw byte %0d", k)); break;
    end
    check(got.eth_v == (len >= 14), "eth valid");
    check(got.ipv4_v == (ipv4 && len >= 34), "ipv4 valid");
    check(got.udp_v == (ipv4 && len >= 42), "udp valid");
    check(got.wib_v == (ipv4 && len >= 74), "wib valid");
    if (len >= 14) check(got.eth.ethertype == {f[base + 12], f[base + 13]}
                         && got.eth.dst[47:40] == f[base], "ethernet fields");
    if (ipv4 && len >= 34) check(got.ipv4.dst == {f[base+30], f[base+31], f[base+32], f[base+33]},
                                 "ipv4 destination");
    if (ipv4 && len >= 42) check(got.udp.dst_port == {f[base+36], f[base+37]}, "udp port");
    if (ipv4 && len >= 74) begin
      check(got.daq_raw[0][63:56] == f[base + 42] && got.daq_raw[1][7:0] == f[base + 57], "DAQ raw words");
      check(got.wib_raw[0][63:56] == f[base + 58] && got.wib_raw[1][7:0] == f[base + 73], "WIB raw words");
    end
    exp_words = (ipv4 && len >= 74) ? (raw_len - 74) / 8 : 0;
    for (int w = 0; w < SEG_WORDS; w++) begin
      check(got.word_v[w] == (w < exp_words), $sformatf("word %0d valid", w));
      if (w < exp_words) check(got.seg_raw[w][63:56] == f[base + 74 + 8*w]
                               && got.seg_raw[w][7:0] == f[base + 81 + 8*w], $sformatf("word %0d", w));
    end
    check(body.size() == ((len > RAW_MAX) ? len - RAW_MAX : 0),
          $sformatf("body size %0d", body.size()));
    for (int k = 0; k < body.size(); k++) if (body[k] != f[base + RAW_MAX + k]) begin
      check(0, $sformatf("body byte %0d", k)); break;
    end
    @(negedge clk); pass_done = 1; @(negedge clk); pass_done = 0;
  endtask

  initial begin
    in_valid = 0; in_beat = '0; start_ok = 1; pass_done = 0; body_ready = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    run(1000, 0, 0, 1);   // DUNE-like frame, network port
    run(1001, 1, 7, 1);   // recirculated frame with count 7
    run(74 + 100, 0, 0, 1); // ends inside the segment
    run(RAW_MAX, 1, 2, 1);  // ends exactly at the window
    run(60, 0, 0, 1);     // short UDP frame
    run(300, 0, 0, 0);    // not IPv4
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
