// tb_ingress_deparser: the three output layouts are built from random header
// vectors, sample sets and bodies and compared byte for byte with a reference
// model.
// Cases: recirculation (pass-count byte + 74 header bytes + body), final
// DUNE pass (headers + 192-byte sample header with zeros for invalid samples
// + segment + body), DUNE frame without body, non-DUNE frame with and
// without body, dropped frame. The body's first beat starts at a random lane;
// body gaps and output back-pressure are random. The routing outputs must
// stay constant for the frame and pass_done must pulse once per frame.
module tb_ingress_deparser;
  import dune_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, idle, body_valid, body_ready, out_valid, out_ready;
  logic out_recirc, out_drop, pass_done, in_recirc, in_drop;
  phv_t in_phv;
  adc_vec_t in_adc;
  logic [SEG_ADCS-1:0] in_adc_v;
  logic [7:0] in_next_cnt;
  port_t in_port, out_port;
  beat_t body_beat, out_beat;
  ingress_deparser dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  byte unsigned got [$];
  int n_done, flag_err;
  bit got_last;
  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);
  always @(negedge clk) if (rst_n) begin
    if (pass_done) n_done++;
    if (out_valid) begin
      if (out_recirc !== in_recirc || out_drop !== in_drop || out_port !== in_port) flag_err++;
      if (out_ready) begin
        for (int l = 0; l < BEAT_BYTES; l++) if (out_beat.keep[l]) got.push_back(out_beat.data[8*l +: 8]);
        if (out_beat.last) got_last = 1;
      end
    end
  end

  task automatic run(bit rec, bit dune, int raw_len, int body_len, bit drop);
    byte unsigned body [$], exp [$];
    int lane, i;
    bit ok;
    in_phv = '0;
    for (int k = 0; k < RAW_MAX; k++) in_phv.raw[k] = 8'($urandom);
    in_phv.raw_len = 8'(raw_len);
    in_phv.wib_v = dune;
    in_phv.more = (body_len > 0);
    for (int k = 0; k < SEG_ADCS; k++) begin
      in_adc[k] = {2'b00, 14'($urandom)};
      in_adc_v[k] = ($urandom_range(0, 4) != 0);
    end
    in_recirc = rec; in_drop = drop; in_next_cnt = 8'($urandom);
    in_port = 9'($urandom);
    for (int k = 0; k < body_len; k++) body.push_back(8'($urandom));
    // reference layout
    if (rec) begin
      exp.push_back(in_next_cnt);
      for (int k = 0; k < HDR_BYTES; k++) exp.push_back(in_phv.raw[k]);
    end else if (dune) begin
      for (int k = 0; k < HDR_BYTES; k++) exp.push_back(in_phv.raw[k]);
      for (int k = 0; k < SEG_ADCS; k++) begin
        exp.push_back(in_adc_v[k] ? in_adc[k][15:8] : 8'h00);
        exp.push_back(in_adc_v[k] ? in_adc[k][7:0] : 8'h00);
      end
      for (int k = HDR_BYTES; k < raw_len; k++) exp.push_back(in_phv.raw[k]);
    end else
      for (int k = 0; k < raw_len; k++) exp.push_back(in_phv.raw[k]);
    foreach (body[k]) exp.push_back(body[k]);

    got.delete(); n_done = 0; flag_err = 0; got_last = 0;
    while (!idle) @(negedge clk);
    check(idle, "idle before frame");
    in_valid = 1; @(negedge clk); in_valid = 0;
    // body stream, first byte at a random lane
    lane = $urandom_range(0, BEAT_BYTES - 1);
    i = 0;
    while (i < body_len) begin
      int n = 0;
      body_beat = '0;
      for (int l = lane; l < BEAT_BYTES && i + n < body_len; l++) begin
        body_beat.data[8*l +: 8] = body[i + n]; body_beat.keep[l] = 1; n++;
      end
      body_beat.last = (i + n >= body_len);
      if ($urandom_range(0, 3) == 0) begin body_valid = 0; @(negedge clk); end
      body_valid = 1;
      do begin #1 ok = body_ready; @(negedge clk); end while (!ok);
      body_valid = 0;
      i += n; lane = 0;
    end
    while (!got_last) @(negedge clk);
    repeat (3) @(negedge clk);
    check(got.size() == exp.size(), $sformatf("length %0d exp %0d", got.size(), exp.size()));
    for (int k = 0; k < exp.size() && k < got.size(); k++) if (got[k] != exp[k]) begin
      check(0, $sformatf("byte %0d: %02x exp %02x", k, got[k], exp[k])); break;
    end
    check(flag_err == 0, "routing outputs constant for the frame");
    check(n_done == 1, $sformatf("pass_done pulses %0d", n_done));
    check(idle, "idle after frame");
  endtask

  initial begin
    in_valid = 0; body_valid = 0; body_beat = '0; in_phv = '0;
    in_recirc = 0; in_drop = 0; in_port = '0; in_next_cnt = 0; in_adc = '0; in_adc_v = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      run(1, 1, RAW_MAX, 1000 + r, 0);  // recirculate
      run(0, 1, RAW_MAX, 800 + r, 0);   // final pass with body
      run(0, 1, 74 + 8*r + 3, 0, 0);    // final pass, frame ends in the segment
      run(0, 0, 60 + r, 0, 0);          // short frame, unchanged
      run(0, 0, RAW_MAX, 300 + r, 1);   // long non-DUNE frame, marked drop
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
