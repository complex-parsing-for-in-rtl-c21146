// tb_recirc_sweep: throughput of the full-size parser against the number of
// recirculations, for one and for two continuous streams of 7,242-byte DUNE
// frames.
//
// For each depth 0..16 one network input is kept busy with NF frames sent
// back to back (the source waits whenever mac_ready is low); then both
// network inputs are kept busy at once with NF frames each. Every frame
// leaving the egress port is compared byte for byte with a reference built
// here: headers, the 96 samples of the last segment read bit by bit from the
// little-endian waveform, and the remaining waveform. The run time per
// frame is measured from the first input beat to the last egress beat.
// Checks per depth: all frames arrive intact; the time is not below the
// bound set by the parser input, one beat per cycle for every pass of every
// frame (sum over passes k of ceil((16 + (k>0) + 7242 - 168k) / 8)), and not
// above that bound by more than a fixed allowance per pass; the delivered
// rate falls as the depth grows; from depth 1 on, network frames have to
// wait for recirculated ones; with two streams each stream gets less than a
// single stream did and the two together no more than the single stream.
// The printed table gives the delivered input rate in bits per cycle
// (Gbit/s at a 1 GHz clock).
module tb_recirc_sweep;
  import dune_pkg::*;

  localparam int NF     = 4;
  localparam int FLEN   = HDR_BYTES + PAYLOAD_BYTES;   // 7242
  localparam int MAXD   = 16;
  localparam int SLACK  = 24;                          // allowed extra cycles per pass

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

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ------------------------------------------------------------ frames
  byte unsigned tx [2*NF][FLEN];
  byte unsigned ex [2*NF][FLEN + ADC_HDR_BYTES];
  int           exl [2*NF];

  function automatic int ref_adc(int id, int off, int len, int k);
    int v, bit_i, byte_i;
    v = 0;
    for (int b = 0; b < ADC_BITS; b++) begin
      bit_i = ADC_BITS * k + b;
      byte_i = bit_i / 8;
      if (byte_i < len) v |= ((tx[id][off + byte_i] >> (bit_i % 8)) & 1) << b;
    end
    return v;
  endfunction

  // passes made by a full frame at depth D: recirculate while the frame
  // still extends past the current segment
  function automatic int final_cnt(int D);
    int c;
    c = 0;
    while (c < D && (PAYLOAD_BYTES - SEG_BYTES * c) > SEG_BYTES) c++;
    return c;
  endfunction

  function automatic void make(int id, int D);
    int c, off, len, n, v;
    for (int i = 0; i < FLEN; i++) tx[id][i] = 8'($urandom);
    tx[id][12] = 8'h08; tx[id][13] = 8'h00;
    tx[id][14] = 8'h45; tx[id][18] = 8'h00; tx[id][19] = 8'(id); tx[id][23] = 8'd17;
    tx[id][30] = 8'd10; tx[id][31] = 8'd0; tx[id][32] = 8'd0; tx[id][33] = 8'd1;
    c   = final_cnt(D);
    off = HDR_BYTES + SEG_BYTES * c;
    len = (PAYLOAD_BYTES - SEG_BYTES * c < SEG_BYTES) ? PAYLOAD_BYTES - SEG_BYTES * c : SEG_BYTES;
    n   = 0;
    for (int i = 0; i < HDR_BYTES; i++) ex[id][n++] = tx[id][i];
    for (int k = 0; k < SEG_ADCS; k++) begin
      v = (((ADC_BITS * k + ADC_BITS - 1) / 64) < (len / 8)) ? ref_adc(id, off, len, k) : 0;
      ex[id][n++] = 8'(v >> 8);
      ex[id][n++] = 8'(v);
    end
    for (int i = off; i < FLEN; i++) ex[id][n++] = tx[id][i];
    exl[id] = n;
  endfunction

  // cycles the parser input needs at least for one frame at depth D
  function automatic int bound_cycles(int D);
    int t, bytes;
    t = 0;
    for (int k = 0; k <= final_cnt(D); k++) begin
      bytes = META_BYTES + (k > 0 ? RH_BYTES : 0) + FLEN - SEG_BYTES * k;
      t += (bytes + BEAT_BYTES - 1) / BEAT_BYTES;
    end
    return t;
  endfunction

  task automatic cp_write(cp_table_e t, int addr, logic [63:0] d);
    @(negedge clk);
    cp_we = 1'b1; cp_table = t; cp_addr = 8'(addr); cp_wdata = d;
    @(negedge clk);
    cp_we = 1'b0;
  endtask

  task automatic send(int id, int port);
    int i;
    bit ok;
    i = 0;
    while (i < FLEN) begin
      for (int l = 0; l < BEAT_BYTES; l++) begin
        mac_beat[port].data[8*l +: 8] = (i + l < FLEN) ? tx[id][i + l] : 8'h00;
        mac_beat[port].keep[l]        = (i + l < FLEN);
      end
      mac_beat[port].last = (i + BEAT_BYTES >= FLEN);
      mac_valid[port] = 1'b1;
      do begin
        #1 ok = mac_ready[port];
        @(negedge clk);
      end while (!ok);
      i += BEAT_BYTES;
    end
    mac_valid[port] = 1'b0;
  endtask

  // ------------------------------------------------------------ egress
  byte unsigned rx [FLEN + ADC_HDR_BYTES + 64];
  int  rxn = 0, n_rx = 0;
  longint t_last;

  always @(negedge clk) if (rst_n && eg_valid && eg_ready) begin
    for (int l = 0; l < BEAT_BYTES; l++)
      if (eg_beat.keep[l] && rxn < $size(rx)) rx[rxn++] = eg_beat.data[8*l +: 8];
    if (eg_beat.last) begin
      int id;
      bit ok;
      id = rx[19];
      ok = (id < 2 * NF) && (rxn == exl[id]) && (eg_port == 9'd5);
      if (ok) for (int i = 0; i < rxn; i++) if (rx[i] != ex[id][i]) ok = 0;
      check(ok, $sformatf("egress frame %0d length %0d", id, rxn));
      n_rx++;
      t_last = cycle;
      rxn = 0;
    end
  end

  // ------------------------------------------------------------ sweep
  // Runs NF frames per stream on `streams` network inputs at depth D and
  // returns the cycles from the first input beat to the last egress beat.
  task automatic run(int D, int streams, output longint dt);
    int wait0;
    longint t0;
    for (int f = 0; f < streams * NF; f++) make(f, D);
    n_rx = 0;
    cp_rd_addr = 8'd3;
    #1 wait0 = cp_rd_data;
    @(negedge clk);
    t0 = cycle;
    fork
      for (int f = 0; f < NF; f++) send(f, 0);
      if (streams > 1) for (int f = NF; f < 2 * NF; f++) send(f, 1);
    join
    while (n_rx < streams * NF) @(negedge clk);
    dt = t_last - t0;
    check(n_rx == streams * NF, $sformatf("depth %0d, %0d streams: frames out", D, streams));
    if (D > 0 || streams > 1) begin
      #1 check(cp_rd_data > wait0, $sformatf("depth %0d, %0d streams: no network frame waited", D, streams));
    end
    repeat (20) @(negedge clk);
  endtask

  initial begin
    fwd_entry_t fe;
    longint dt1, dt2;
    int bnd;
    real r1, r2, prev1, prev2;
    mac_valid = 0; mac_beat = '0; cp_we = 0; cp_table = CP_RECIRC; cp_addr = 0;
    cp_wdata = 0; cp_rd_table = CP_STATS; cp_rd_addr = 8'd3; eg_ready = 1;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    fe = '0; fe.valid = 1; fe.dst_ip = 32'h0a000001; fe.port = 9'd5;
    cp_write(CP_FWD, 0, fe);
    prev1 = 1.0e9; prev2 = 1.0e9;
    $display("depth  passes  bound/frame  one stream: cycles/frame  bits/cycle   two streams: bits/cycle each  total");
    for (int D = 0; D <= MAXD; D++) begin
      cp_write(CP_RECIRC, 0, 64'(D));
      run(D, 1, dt1);
      run(D, 2, dt2);
      bnd = NF * bound_cycles(D);
      r1 = real'(NF) * FLEN * 8 / real'(dt1);
      r2 = real'(NF) * FLEN * 8 / real'(dt2);
      $display("%5d  %6d  %11d  %24.1f  %10.3f  %28.3f  %6.3f", D, final_cnt(D) + 1, bnd / NF,
               real'(dt1) / NF, r1, r2, 2 * r2);
      check(dt1 >= bnd, $sformatf("depth %0d: %0d cycles below the input bound %0d", D, dt1, bnd));
      check(dt1 <= bnd + SLACK * NF * (final_cnt(D) + 1) + 4 * FLEN / BEAT_BYTES,
            $sformatf("depth %0d: %0d cycles, bound %0d", D, dt1, bnd));
      check(dt2 >= 2 * bnd, $sformatf("depth %0d, two streams: %0d cycles below the bound", D, dt2));
      check(dt2 <= 2 * bnd + 2 * SLACK * NF * (final_cnt(D) + 1) + 4 * FLEN / BEAT_BYTES,
            $sformatf("depth %0d, two streams: %0d cycles, bound %0d", D, dt2, 2 * bnd));
      check(r1 < prev1 && r2 < prev2, $sformatf("depth %0d: rate does not fall", D));
      check(r2 < r1 && 2 * r2 <= r1 * 1.02, $sformatf("depth %0d: two streams %f each vs %f", D, r2, r1));
      prev1 = r1; prev2 = r2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
