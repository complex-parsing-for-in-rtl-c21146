// tb_ingress_port_merge: frames from two network inputs and the
// recirculation input are merged into one stream.
// Checks: every output frame starts with the 16-byte prefix whose port field
// names its source (0 and 1 for the network inputs, 68 for recirculation),
// whose timestamp increases from frame to frame and whose port-metadata half
// is zero; the frame bytes follow unchanged and in source order; while all
// three sources have frames waiting, grants rotate 0, 1, recirculation.
// Admission limit: with no frame leaving the loop, only LOOP_FRAMES (2)
// network frames are admitted, both waiting inputs are counted every cycle,
// and each frame_exit pulse lets exactly one more in. Random back-pressure on
// the output. The module runs with its default parameters.
module tb_ingress_port_merge;
  import dune_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  beat_t [1:0] mac_beat;
  logic  [1:0] mac_valid, mac_ready;
  beat_t rc_beat, out_beat;
  logic rc_valid, rc_ready, frame_exit, out_valid, out_ready;
  logic [31:0] mac_wait_cycles, n_mac_frames, n_rc_frames;
  ingress_port_merge dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // per-source drive signals: 0, 1 network inputs, 2 recirculation
  beat_t b [3];
  logic  v [3], r [3];
  assign mac_beat  = {b[1], b[0]};
  assign mac_valid = {v[1], v[0]};
  assign rc_beat   = b[2];
  assign rc_valid  = v[2];
  always_comb begin r[0] = mac_ready[0]; r[1] = mac_ready[1]; r[2] = rc_ready; end

  typedef byte unsigned bytes_t [$];
  bytes_t q [3] [$];               // frames still to be seen at the output
  bytes_t cur;
  int out_frames, n_out [3], rotations, prev_src;
  bit auto_exit;
  logic exit_auto, exit_man;
  assign frame_exit = exit_auto | exit_man;
  logic [47:0] last_ts;

  always @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(negedge clk) if (rst_n) begin
    exit_auto = 0;
    if (out_valid && out_ready) begin
      for (int l = 0; l < BEAT_BYTES; l++) if (out_beat.keep[l]) cur.push_back(out_beat.data[8*l +: 8]);
      if (out_beat.last) begin
        port_t p;
        logic [47:0] ts;
        bytes_t e;
        bit zero;
        int src;
        p = {cur[0][0], cur[1]};
        ts = {cur[2], cur[3], cur[4], cur[5], cur[6], cur[7]};
        zero = 1;
        for (int k = 8; k < 16; k++) if (cur[k] != 0) zero = 0;
        src = (p == 9'd68) ? 2 : (p == 9'd0) ? 0 : (p == 9'd1) ? 1 : -1;
        check(src >= 0, $sformatf("prefix port %0d", p));
        check(out_frames == 0 || ts > last_ts, "timestamps increase");
        check(zero, "port metadata zero");
        last_ts = ts;
        if (src >= 0) begin
          e = q[src].pop_front();
          cur = cur[16:$];
          check(e == cur, $sformatf("frame %0d bytes (source %0d)", out_frames, src));
          if (out_frames > 0 && src == (prev_src + 1) % 3) rotations++;
          prev_src = src; n_out[src]++;
          if (src < 2 && auto_exit) exit_auto = 1;
        end
        out_frames++;
        cur.delete();
      end
    end
  end

  task automatic send(int s, input bytes_t f);
    int i = 0;
    bit ok;
    while (i < f.size()) begin
      b[s] = '0;
      for (int l = 0; l < BEAT_BYTES; l++) if (i + l < f.size()) begin
        b[s].data[8*l +: 8] = f[i + l]; b[s].keep[l] = 1;
      end
      b[s].last = (i + BEAT_BYTES >= f.size());
      v[s] = 1;
      do begin #1 ok = r[s]; @(negedge clk); end while (!ok);
      i += BEAT_BYTES;
    end
    v[s] = 0;
  endtask

  function automatic bytes_t rnd(int len);
    bytes_t f;
    for (int k = 0; k < len; k++) f.push_back(8'($urandom));
    return f;
  endfunction

  task automatic source(int s, int n, int maxlen);
    bytes_t f;
    for (int k = 0; k < n; k++) begin
      f = rnd($urandom_range(1, maxlen)); q[s].push_back(f); send(s, f);
    end
  endtask

  task automatic pulse_exit();
    exit_man = 1; @(negedge clk); exit_man = 0;
  endtask

  initial begin
    for (int s = 0; s < 3; s++) begin b[s] = '0; v[s] = 0; n_out[s] = 0; end
    exit_auto = 0; exit_man = 0; auto_exit = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    // Phase 1: all three sources busy; network frames leave the loop as soon
    // as they have been passed on.
    fork
      source(0, 10, 300);
      source(1, 10, 300);
      source(2, 10, 300);
    join
    repeat (50) @(negedge clk);
    check(n_out[0] == 10 && n_out[1] == 10 && n_out[2] == 10,
          $sformatf("frames out %0d/%0d/%0d", n_out[0], n_out[1], n_out[2]));
    check(rotations >= 27, $sformatf("round-robin rotations %0d of 29", rotations));
    check(n_mac_frames == 20 && n_rc_frames == 10, "frame counters");
    // Phase 2: network frames only leave the loop when frame_exit is pulsed
    // by hand, so the admission limit becomes visible.
    auto_exit = 0;
    fork
      source(0, 3, 64);
      source(1, 3, 64);
      begin
        int w0;
        repeat (400) @(negedge clk);
        check(n_out[0] + n_out[1] == 22, $sformatf("admitted network frames %0d exp 22", n_out[0] + n_out[1]));
        w0 = mac_wait_cycles;
        repeat (20) @(negedge clk);
        check(mac_wait_cycles == w0 + 40, $sformatf("waiting cycles %0d exp %0d", mac_wait_cycles, w0 + 40));
        for (int k = 1; k <= 4; k++) begin
          pulse_exit();
          repeat (200) @(negedge clk);
          check(n_out[0] + n_out[1] == 22 + k, $sformatf("after %0d exits %0d", k, n_out[0] + n_out[1]));
        end
      end
    join
    repeat (200) @(negedge clk);
    check(q[0].size() == 0 && q[1].size() == 0, "all network frames delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
