// tb_dune_parser_top: end-to-end test of the DUNE frame parser at its
// default parameters.
//
// Builds DUNE frames (Ethernet/IPv4/UDP, 16-byte DAQ and WIB headers,
// 7,168 bytes of waveform) from random bytes, sends them through the network
// port and compares every frame leaving the egress port with a reference
// worked out here byte by byte: the sample values are read bit by bit from
// the little-endian waveform, independently of the word-level logic in the
// design. Each pass's 96 samples (res_* outputs) are checked against the
// segment the pass should see, so a run at depth 42 checks every sample of
// the frame. Scenarios: no recirculation, a few recirculations, a depth
// beyond the end of the frame, a full parse, a short UDP frame, a non-IPv4
// frame and a forwarding miss (both dropped), a run-time ADC value from the
// chunk processor, checkpoint counters, two frames sent at the same time on
// the two network ports (both in the loop at once) and
// egress back-pressure. Every mechanism is counted and must occur.
module tb_dune_parser_top;
  import dune_pkg::*;

  localparam int MAXF = 16;
  localparam int MAXB = MAX_FRAME_BYTES;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  beat_t [1:0] mac_beat;
  logic  [1:0] mac_valid, mac_ready;
  beat_t eg_beat;
  logic  eg_valid, eg_ready;
  port_t eg_port;
  logic  cp_we;
  cp_table_e cp_table, cp_rd_table;
  logic [7:0]  cp_addr, cp_rd_addr;
  logic [63:0] cp_wdata;
  logic [31:0] cp_rd_data;
  logic        res_valid, res_dune;
  logic [7:0]  res_recirc_cnt;
  daq_hdr_t    res_daq;
  wib_hdr_t    res_wib;
  adc_vec_t    res_adc;
  logic [SEG_ADCS-1:0] res_adc_v;

  dune_parser_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ frames
  byte unsigned tx  [MAXF][MAXB];
  int           txl [MAXF];
  byte unsigned ex  [MAXF][MAXB];
  int           exl [MAXF];
  port_t        exp_port [MAXF];
  int           got [MAXF];

  // chunk processor entry mirrored here
  bit         ov_en = 0;
  int         ov_cnt, ov_idx, ov_val;

  function automatic void make_frame(int id, int L, logic [31:0] dst_ip,
                                     logic [15:0] ethertype);
    for (int i = 0; i < L; i++) tx[id][i] = 8'($urandom);
    // Ethernet
    tx[id][12] = ethertype[15:8]; tx[id][13] = ethertype[7:0];
    // IPv4: version 4, IHL 5, id = frame number, protocol UDP
    tx[id][14] = 8'h45;
    tx[id][18] = 8'(id >> 8); tx[id][19] = 8'(id);
    tx[id][23] = 8'd17;
    for (int i = 0; i < 4; i++) tx[id][30 + i] = dst_ip[8*(3-i) +: 8];
    txl[id] = L;
  endfunction

  // sample k of the segment seg[0..len-1]: bits 14k..14k+13, little-endian
  function automatic int ref_adc(int id, int off, int len, int k);
    int v = 0;
    for (int b = 0; b < ADC_BITS; b++) begin
      int bit_i = ADC_BITS * k + b;
      int byte_i = bit_i / 8;
      if (byte_i < len) v |= ((tx[id][off + byte_i] >> (bit_i % 8)) & 1) << b;
    end
    return v;
  endfunction

  function automatic bit ref_adc_v(int len, int k);
    return ((ADC_BITS * k + ADC_BITS - 1) / 64) < (len / 8);
  endfunction

  // final pass count for a DUNE frame of P waveform bytes at depth D
  function automatic int final_cnt(int P, int D);
    int c = 0;
    while (c < D && (P - SEG_BYTES * c) > SEG_BYTES) c++;
    return c;
  endfunction

  function automatic void make_expected(int id, int D, port_t port);
    int P   = txl[id] - HDR_BYTES;
    int c   = final_cnt(P, D);
    int off = HDR_BYTES + SEG_BYTES * c;
    int len = (P - SEG_BYTES * c < SEG_BYTES) ? P - SEG_BYTES * c : SEG_BYTES;
    int n   = 0;
    for (int i = 0; i < HDR_BYTES; i++) ex[id][n++] = tx[id][i];
    for (int k = 0; k < SEG_ADCS; k++) begin
      int v = ref_adc_v(len, k) ? ref_adc(id, off, len, k) : 0;
      if (ov_en && ov_cnt == c && ov_idx == k) v = ov_val;
      ex[id][n++] = 8'(v >> 8);
      ex[id][n++] = 8'(v);
    end
    for (int i = off; i < txl[id]; i++) ex[id][n++] = tx[id][i];
    exl[id] = n;
    exp_port[id] = port;
    got[id] = 0;
  endfunction

  function automatic void make_expected_plain(int id, port_t port);
    for (int i = 0; i < txl[id]; i++) ex[id][i] = tx[id][i];
    exl[id] = txl[id];
    exp_port[id] = port;
    got[id] = 0;
  endfunction

  // ------------------------------------------------------------ drivers
  // Inputs change only at the falling edge; mac_ready is sampled there and
  // the beat is taken at the following rising edge.
  task automatic send(int id, int port = 0);
    int i = 0;
    bit ok;
    @(negedge clk);
    while (i < txl[id]) begin
      for (int l = 0; l < BEAT_BYTES; l++) begin
        mac_beat[port].data[8*l +: 8] = (i + l < txl[id]) ? tx[id][i + l] : 8'h00;
        mac_beat[port].keep[l]        = (i + l < txl[id]);
      end
      mac_beat[port].last = (i + BEAT_BYTES >= txl[id]);
      mac_valid[port] = 1'b1;
      do begin
        #1 ok = mac_ready[port];
        @(negedge clk);
      end while (!ok);
      i += BEAT_BYTES;
    end
    mac_valid[port] = 1'b0;
  endtask

  task automatic cp_write(cp_table_e t, int addr, logic [63:0] d);
    @(negedge clk);
    cp_we = 1'b1; cp_table = t; cp_addr = 8'(addr); cp_wdata = d;
    @(negedge clk);
    cp_we = 1'b0;
  endtask

  // snapshot of every readable counter, refreshed by read_all
  logic [31:0] rd_chk1 [4], rd_chk2 [4], rd_stats [6];
  task automatic read_all();
    for (int a = 0; a < 4; a++) begin
      cp_rd_table = CP_CHK1; cp_rd_addr = 8'(a); #1 rd_chk1[a] = cp_rd_data;
      cp_rd_table = CP_CHK2; cp_rd_addr = 8'(a); #1 rd_chk2[a] = cp_rd_data;
    end
    for (int a = 0; a < 6; a++) begin
      cp_rd_table = CP_STATS; cp_rd_addr = 8'(a); #1 rd_stats[a] = cp_rd_data;
    end
  endtask

  // ------------------------------------------------------------ monitors
  byte unsigned rx [MAXB];
  int  rxn = 0;
  int  n_rx_frames = 0;
  bit  bp_en = 0;
  int  bp_stalls = 0;

  always @(posedge clk) eg_ready <= bp_en ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(negedge clk) if (rst_n && eg_valid) begin
    if (!eg_ready) bp_stalls++;
    else begin
      for (int l = 0; l < BEAT_BYTES; l++)
        if (eg_beat.keep[l] && rxn < MAXB) rx[rxn++] = eg_beat.data[8*l +: 8];
      if (eg_beat.last) begin
        int id;
        bit ok;
        id = {rx[18], rx[19]};
        n_rx_frames++;
        ok = (id < MAXF) && (rxn == exl[id]) && (eg_port == exp_port[id]);
        if (ok) for (int i = 0; i < rxn; i++) if (rx[i] != ex[id][i]) ok = 0;
        check(ok, $sformatf("egress frame id %0d len %0d exp %0d port %0d", id, rxn,
                            (id < MAXF) ? exl[id] : -1, eg_port));
        if (id < MAXF) got[id]++;
        rxn = 0;
      end
    end
  end

  // per-pass sample check for the frame under test
  int  cur_id = -1;
  int  pass_checked = 0;
  int  partial_segments = 0;
  always @(negedge clk) if (rst_n && res_valid && res_dune && cur_id >= 0) begin
    int c, P, off, len, v;
    bit ok, vv;
    logic [63:0] w0;
    c   = res_recirc_cnt;
    P   = txl[cur_id] - HDR_BYTES;
    off = HDR_BYTES + SEG_BYTES * c;
    len = (P - SEG_BYTES * c < SEG_BYTES) ? P - SEG_BYTES * c : SEG_BYTES;
    ok  = 1;
    for (int k = 0; k < SEG_ADCS; k++) begin
      v  = ref_adc(cur_id, off, len, k);
      vv = ref_adc_v(len, k);
      if (ov_en && ov_cnt == c && ov_idx == k) begin v = ov_val; vv = 1; end
      if (res_adc_v[k] != vv || (vv && res_adc[k] != 16'(v))) ok = 0;
    end
    if (len < SEG_BYTES) partial_segments++;
    check(ok, $sformatf("pass %0d samples", c));
    // DAQ/WIB converted: first header word read little-endian
    for (int i = 0; i < 8; i++) w0[8*i +: 8] = tx[cur_id][42 + i];
    check(res_daq.block_length == w0[11:0] && res_daq.version == w0[63:58],
          "DAQ header conversion");
    for (int i = 0; i < 8; i++) w0[8*i +: 8] = tx[cur_id][58 + i];
    check(res_wib.channel == w0[7:0] && res_wib.timestamp0 == w0[63:49]
          && res_wib.flags.ready == w0[22], "WIB header conversion");
    pass_checked++;
  end

  task automatic wait_frames(int n, int maxcyc);
    int t = 0;
    while (n_rx_frames < n && t < maxcyc) begin @(posedge clk); t++; end
    repeat (50) @(posedge clk);
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ scenarios
  localparam logic [31:0] IP_A = 32'h0a000001, IP_B = 32'h0a000002, IP_X = 32'h0a0000ff;
  int nf;
  int m_recirc_runs = 0, m_end_stop = 0, m_drop = 0, m_plain = 0, m_override = 0,
      m_two = 0, m_full = 0;

  initial begin
    chk_entry_t ce;
    chunk_entry_t ke;
    fwd_entry_t fe;
    int exp_drop, c;
    mac_valid = 0; mac_beat = '0; cp_we = 0; cp_table = CP_RECIRC; cp_addr = 0;
    cp_wdata = 0; cp_rd_table = CP_STATS; cp_rd_addr = 0; eg_ready = 1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    fe = '0; fe.valid = 1; fe.dst_ip = IP_A; fe.port = 9'd5;  cp_write(CP_FWD, 0, fe);
    fe = '0; fe.valid = 1; fe.dst_ip = IP_B; fe.port = 9'd7;  cp_write(CP_FWD, 3, fe);
    // checkpoint 1: entry0 recirculated passes, entry1 fresh passes
    ce = '0; ce.valid = 1; ce.is_recirc = 1; cp_write(CP_CHK1, 0, ce);
    ce = '0; ce.valid = 1; ce.is_recirc = 0; cp_write(CP_CHK1, 1, ce);
    // checkpoint 2: recirculating passes that are themselves recirculated
    ce = '0; ce.valid = 1; ce.is_recirc = 1; cp_write(CP_CHK2, 0, ce);
    ce = '0; ce.valid = 1; ce.is_recirc = 0; cp_write(CP_CHK2, 1, ce);

    // 1. depth 0: the first segment, no recirculation
    nf = 0;
    make_frame(0, HDR_BYTES + PAYLOAD_BYTES, IP_A, ETHERTYPE_IPV4);
    cp_write(CP_RECIRC, 0, 64'd0);
    make_expected(0, 0, 9'd5);
    cur_id = 0; send(0); nf++; wait_frames(nf, 100000); read_all();
    check(got[0] == 1, "frame 0 forwarded once");
    check(rd_chk1[1] == 1 && rd_chk1[0] == 0, "checkpoint 1 after depth 0");
    check(rd_chk2[1] == 0, "checkpoint 2 idle at depth 0");

    // 2. depth 3 with a run-time sample in pass 3 and a value checkpoint
    make_frame(1, HDR_BYTES + PAYLOAD_BYTES, IP_B, ETHERTYPE_IPV4);
    cp_write(CP_RECIRC, 0, 64'd3);
    ov_en = 1; ov_cnt = 3; ov_idx = 9; ov_val = 14'h2abc;
    ke = '0; ke.valid = 1; ke.cnt = 8'd3; ke.idx = 7'd9; ke.value = 14'h2abc;
    cp_write(CP_CHUNK, 0, ke);
    ce = '0; ce.valid = 1; ce.is_recirc = 1; ce.cnt_en = 1; ce.cnt = 8'd3;
    ce.adc_en = 1; ce.adc_idx = 7'd9; ce.adc_value = 14'h2abc;
    cp_write(CP_CHK1, 2, ce);
    // value check on an untouched sample of pass 2
    ce = '0; ce.valid = 1; ce.is_recirc = 1; ce.cnt_en = 1; ce.cnt = 8'd2;
    ce.adc_en = 1; ce.adc_idx = 7'd4;
    ce.adc_value = 14'(ref_adc(1, HDR_BYTES + 2 * SEG_BYTES, SEG_BYTES, 4));
    cp_write(CP_CHK1, 3, ce);
    make_expected(1, 3, 9'd7);
    cur_id = 1; send(1); nf++; wait_frames(nf, 100000); read_all();
    check(got[1] == 1, "frame 1 forwarded once");
    check(rd_chk1[0] == 3, "checkpoint 1 counted 3 recirculated passes");
    check(rd_chk1[2] == 1, "checkpoint 1 matched run-time sample");
    check(rd_chk1[3] == 1, "checkpoint 1 matched expected sample");
    check(rd_chk2[1] == 1 && rd_chk2[0] == 2, "checkpoint 2 counts");
    check(rd_stats[1] == 3, "three recirculations");
    m_recirc_runs++; m_override++;
    ov_en = 0; ke = '0; cp_write(CP_CHUNK, 0, ke);

    // 3. short UDP frame, forwarded unchanged; ARP-like frame and unknown
    //    destination dropped
    make_frame(2, 54, IP_A, ETHERTYPE_IPV4);
    make_expected_plain(2, 9'd5);
    cur_id = -1; send(2); nf++; wait_frames(nf, 20000);
    check(got[2] == 1, "short UDP frame forwarded");
    m_plain++;
    exp_drop = 0;
    make_frame(3, 200, IP_A, 16'h0806);
    make_expected_plain(3, 9'd0);
    send(3); repeat (400) @(posedge clk); exp_drop++;
    make_frame(4, HDR_BYTES + PAYLOAD_BYTES, IP_X, ETHERTYPE_IPV4);
    make_expected(4, 3, 9'd0);
    send(4); repeat (12000) @(posedge clk); exp_drop++;
    read_all();
    check(rd_stats[2] == 32'(exp_drop), "non-IPv4 and unknown destination dropped");
    check(got[3] == 0 && got[4] == 0, "dropped frames did not leave");
    m_drop += exp_drop;

    // 4. depth beyond the frame: stops at the last (partial) segment
    make_frame(5, HDR_BYTES + PAYLOAD_BYTES, IP_A, ETHERTYPE_IPV4);
    cp_write(CP_RECIRC, 0, 64'd60);
    make_expected(5, 60, 9'd5);
    pass_checked = 0;
    cur_id = 5; send(5); nf++; wait_frames(nf, 200000);
    check(got[5] == 1, "full parse frame forwarded");
    c = final_cnt(PAYLOAD_BYTES, 60);
    check(c == 42, "reference final count 42");
    check(pass_checked == 43, $sformatf("43 passes checked, got %0d", pass_checked));
    m_end_stop++; m_full++;

    // 5. one frame on each network port at the same time, egress back-pressure
    cp_write(CP_RECIRC, 0, 64'd4);
    make_frame(6, HDR_BYTES + PAYLOAD_BYTES, IP_A, ETHERTYPE_IPV4);
    make_frame(7, HDR_BYTES + PAYLOAD_BYTES - 8 * 25, IP_B, ETHERTYPE_IPV4);
    make_expected(6, 4, 9'd5);
    make_expected(7, 4, 9'd7);
    cur_id = -1; bp_en = 1;
    fork
      send(6, 0);
      send(7, 1);
    join
    nf += 2; wait_frames(nf, 200000); read_all();
    bp_en = 0;
    check(got[6] == 1 && got[7] == 1, "both concurrent frames forwarded");
    m_two++;

    // mechanisms
    check(m_recirc_runs > 0 && rd_stats[1] > 0, "recirculation happened");
    check(m_end_stop > 0 && partial_segments > 0, "partial final segment happened");
    check(m_override > 0, "chunk processor value used");
    check(m_drop > 0, "drops happened");
    check(m_plain > 0, "non-DUNE frame happened");
    check(m_full > 0, "full parse happened");
    check(rd_stats[3] > 0, $sformatf("network frame waited (%0d cycles)", rd_stats[3]));
    check(rd_stats[5] > 0, "recirculated frames re-admitted");
    check(bp_stalls > 0, "egress back-pressure happened");
    check(rd_stats[0] == 32'(nf), "forwarded frame count");
    $display("mechanisms: recirc=%0d drops=%0d mac_wait=%0d bp=%0d partial=%0d passes_full=%0d",
             rd_stats[1], rd_stats[2], rd_stats[3], bp_stalls,
             partial_segments, pass_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
