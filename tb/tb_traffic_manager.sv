// tb_traffic_manager: random frames with random routes (forward to a random
// port, recirculate, drop) are streamed in; forwarded frames must appear on
// the egress stream with their port, recirculated frames on the
// recirculation stream, both byte-exact and in order; dropped frames must
// vanish. The frame counters and the number of frame_exit pulses are checked
// at the end. Egress and recirculation readers apply random back-pressure.
module tb_traffic_manager;
  import dune_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  beat_t in_beat, eg_beat, rc_beat;
  logic in_valid, in_ready, in_recirc, in_drop, eg_valid, eg_ready, rc_valid, rc_ready, frame_exit;
  port_t in_port, eg_port;
  logic [31:0] n_fwd, n_recirc, n_drop;
  traffic_manager dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  typedef struct { byte unsigned b [$]; port_t port; } frame_t;
  frame_t exp_eg [$], exp_rc [$];
  byte unsigned cur_eg [$], cur_rc [$];
  port_t cur_port;
  int eg_frames, rc_frames, exits, port_err;

  always @(posedge clk) begin
    eg_ready <= ($urandom_range(0, 2) != 0);
    rc_ready <= ($urandom_range(0, 2) != 0);
  end
  always @(negedge clk) if (rst_n) begin
    frame_t e;
    if (frame_exit) exits++;
    if (eg_valid && eg_ready) begin
      if (cur_eg.size() == 0) cur_port = eg_port;
      else if (eg_port != cur_port) port_err++;
      for (int l = 0; l < BEAT_BYTES; l++) if (eg_beat.keep[l]) cur_eg.push_back(eg_beat.data[8*l +: 8]);
      if (eg_beat.last) begin
        e = exp_eg.pop_front();
        check(e.b == cur_eg, $sformatf("egress frame %0d bytes", eg_frames));
        check(e.port == cur_port, $sformatf("egress frame %0d port", eg_frames));
        cur_eg.delete(); eg_frames++;
      end
    end
    if (rc_valid && rc_ready) begin
      for (int l = 0; l < BEAT_BYTES; l++) if (rc_beat.keep[l]) cur_rc.push_back(rc_beat.data[8*l +: 8]);
      if (rc_beat.last) begin
        e = exp_rc.pop_front();
        check(e.b == cur_rc, $sformatf("recirculated frame %0d bytes", rc_frames));
        cur_rc.delete(); rc_frames++;
      end
    end
  end

  initial begin
    int nf = 0, nr = 0, nd = 0, route, len, i;
    bit ok;
    frame_t f;
    in_valid = 0; in_beat = '0; in_recirc = 0; in_drop = 0; in_port = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int fr = 0; fr < 60; fr++) begin
      route = $urandom_range(0, 2);
      len = $urandom_range(1, 600);
      f.b.delete();
      for (int k = 0; k < len; k++) f.b.push_back(8'($urandom));
      f.port = 9'($urandom);
      in_recirc = (route == 1); in_drop = (route == 2); in_port = f.port;
      if (route == 0) begin exp_eg.push_back(f); nf++; end
      else if (route == 1) begin exp_rc.push_back(f); nr++; end
      else nd++;
      i = 0;
      while (i < len) begin
        in_beat = '0;
        for (int l = 0; l < BEAT_BYTES; l++) if (i + l < len) begin
          in_beat.data[8*l +: 8] = f.b[i + l]; in_beat.keep[l] = 1;
        end
        in_beat.last = (i + BEAT_BYTES >= len);
        in_valid = 1;
        do begin #1 ok = in_ready; @(negedge clk); end while (!ok);
        i += BEAT_BYTES;
      end
      in_valid = 0;
    end
    repeat (2000) @(negedge clk);
    check(eg_frames == nf && exp_eg.size() == 0, $sformatf("egress frames %0d exp %0d", eg_frames, nf));
    check(rc_frames == nr && exp_rc.size() == 0, $sformatf("recirculated frames %0d exp %0d", rc_frames, nr));
    check(n_fwd == nf && n_recirc == nr && n_drop == nd, "frame counters");
    check(exits == nf + nd, $sformatf("frame_exit pulses %0d exp %0d", exits, nf + nd));
    check(port_err == 0, "egress port constant within a frame");
    $display("routes: forward=%0d recirculate=%0d drop=%0d", nf, nr, nd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
