// Readout controller test against a model of the buffer memory and FIFOs.
// Events with random start addresses and gain flags are read out in normal,
// calibration and test modes with a random-ready consumer; every header and
// data word is compared with words built here from the memory contents.
// Also checked: word parity, event numbering, a corrupted sample reported in
// the next header, sticky TTC and lost-event flags, the exact readout delay
// between events, and that flow control holds the next event back.
module tdmu_ro_ctrl_tb;
  import tdmu_pkg::*;
  logic clk = 0, rst_n = 1;
  mode_e mode;
  logic [3:0] frame_len_m1;
  logic [7:0] ro_delay;
  logic fc_en = 0, link_full = 0;
  logic evt_avail, evt_pop, release_evt;
  logic [7:0] evt_addr, rd_addr;
  logic [2:0] evt_flags;
  logic [63:0] rd_data;
  logic ttc_sin_err = 0, ttc_dbl_err = 0, lost_evt = 0, reg_parity = 0, dyn_parity = 0;
  logic [31:0] word;
  logic word_valid, word_ctrl, word_last, word_ready, idle, par_err;
  logic ser_idle = 1;
  int checks = 0, failures = 0;
  longint cyc = 0;

  logic [63:0] mem [256];
  logic [7:0]  q_addr [$];
  logic [2:0]  q_flags [$];
  logic [31:0] got [$];
  logic        got_ctrl [$], got_last [$];
  longint      last_release = -1, n_stall = 0, n_delay_checked = 0;
  bit          ready_rand = 1;
  logic        pop_pending = 0, avail_at_release = 0;

  // the model's FIFOs are popped at the falling edge, after the controller
  // has taken the head entry at the rising edge
  always @(negedge clk) if (pop_pending) begin
    void'(q_addr.pop_front()); void'(q_flags.pop_front());
    pop_pending <= 1'b0;
  end

  tdmu_ro_ctrl dut (.*);

  always #5 clk = ~clk;
  assign evt_avail = q_addr.size() != 0;
  assign evt_addr  = evt_avail ? q_addr[0] : '0;
  assign evt_flags = evt_avail ? q_flags[0] : '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rd_data <= mem[rd_addr];
    if (evt_pop) begin
      pop_pending <= 1'b1;
      if (release_evt || (last_release >= 0 && avail_at_release)) begin
        longint rel;
        rel = release_evt ? cyc : last_release;
        checks++; n_delay_checked++;
        if (cyc - rel != longint'(ro_delay)) begin
          failures++; $display("delay %0d expected %0d", cyc - rel, ro_delay);
        end
      end
    end
    if (release_evt) begin last_release <= cyc; avail_at_release <= evt_avail; end
    if (word_valid && word_ready) begin
      got.push_back(word); got_ctrl.push_back(word_ctrl); got_last.push_back(word_last);
    end
    word_ready <= ready_rand ? ($urandom_range(0, 3) == 0) : 1'b1;
    if (fc_en && link_full && evt_avail && idle) n_stall++;
  end

  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; if (failures < 8) $display("FAIL %s @%0d", what, cyc); end
  endtask

  function automatic logic [3:0] par4(logic [59:0] d);
    logic [3:0] p = '0;
    for (int i = 0; i < 60; i++) begin
      if (i < 20) p[0] ^= d[i];
      if (i >= 13 && i < 33) p[1] ^= d[i];
      if (i >= 27 && i < 47) p[2] ^= d[i];
      if (i >= 40) p[3] ^= d[i];
    end
    return p;
  endfunction

  function automatic logic [31:0] mkword(logic [29:0] p);
    return {^p[29:15], ^p[14:0], p};
  endfunction

  int evt_count = 0;
  // Runs `n` events in mode `m`; optional corrupted sample in event `bad`.
  task automatic run(input mode_e m, input int len, input int n, input int bad);
    logic [7:0] addrs [$];
    logic [2:0] flg [$];
    bit exp_par_err = 0;
    mode = m; frame_len_m1 = 4'(len - 1);
    got.delete(); got_ctrl.delete(); got_last.delete();
    for (int e = 0; e < n; e++) begin
      logic [7:0] a = 8'($urandom);
      logic [2:0] f = 3'($urandom);
      for (int i = 0; i < len; i++) begin
        logic [59:0] d = {$urandom, $urandom};
        mem[8'(a + i)] = {par4(d), d};
        if (e == bad && i == len / 2) mem[8'(a + i)] ^= 64'd1 << 7;   // stored parity now wrong
      end
      addrs.push_back(a); flg.push_back(f);
    end
    // build expected words before the controller starts
    begin
      logic [31:0] exp_w [$];
      logic        exp_c [$], exp_l [$];
      for (int e = 0; e < n; e++) begin
        header_t h;
        h = '0;
        h.mem_par_err = (e == bad + 1);
        h.mode = m; h.low_gain = (m == MODE_NORMAL) ? flg[e] : 3'b0;
        h.start_addr = addrs[e]; h.evt_num = 13'(evt_count + e);
        exp_w.push_back(32'(h)); exp_c.push_back(1); exp_l.push_back(0);
        for (int i = 0; i < len; i++) begin
          sample_t s = sample_t'(mem[8'(addrs[e] + i)][59:0]);
          logic [29:0] p;
          if (m == MODE_NORMAL) begin
            for (int c = 0; c < 3; c++) p[c*10 +: 10] = flg[e][c] ? s.lg[c] : s.hg[c];
            exp_w.push_back(mkword(p)); exp_c.push_back(0); exp_l.push_back(i == len - 1);
          end else begin
            exp_w.push_back(mkword({s.hg[2], s.hg[1], s.hg[0]})); exp_c.push_back(0); exp_l.push_back(0);
            exp_w.push_back(mkword({s.lg[2], s.lg[1], s.lg[0]})); exp_c.push_back(0); exp_l.push_back(i == len - 1);
          end
        end
      end
      for (int e = 0; e < n; e++) begin q_addr.push_back(addrs[e]); q_flags.push_back(flg[e]); end
      wait (q_addr.size() == 0);
      @(negedge clk); wait (idle); repeat (3) @(negedge clk);
      chk("word count", got.size() == exp_w.size());
      for (int k = 0; k < exp_w.size() && k < got.size(); k++) begin
        chk($sformatf("mode %0d word %0d: %h vs %h", m, k, got[k], exp_w[k]), got[k] == exp_w[k]);
        chk("ctrl/last marks", got_ctrl[k] == exp_c[k] && got_last[k] == exp_l[k]);
      end
    end
    evt_count += n;
  endtask

  initial begin
    mode = MODE_NORMAL; frame_len_m1 = 6; ro_delay = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(MODE_NORMAL, 7, 6, 2);
    ro_delay = 8'd25;
    run(MODE_CALIB, 16, 4, -5);
    ro_delay = 8'd3;
    run(MODE_TEST, 1, 5, -5);
    // sticky status flags reach the next header and are then cleared
    ro_delay = 0; ready_rand = 0;
    @(negedge clk); ttc_sin_err = 1; ttc_dbl_err = 1; lost_evt = 1;
    @(negedge clk); ttc_sin_err = 0; ttc_dbl_err = 0; lost_evt = 0;
    got.delete();
    q_addr.push_back(8'd0); q_flags.push_back(3'd0);
    q_addr.push_back(8'd0); q_flags.push_back(3'd0);
    wait (q_addr.size() == 0); wait (idle); repeat (3) @(negedge clk);
    chk("status flags set", got[0][30] && got[0][29] && got[0][28]);
    chk("status flags cleared", !got[3][30] && !got[3][29] && !got[3][28]);
    // external flow control: nothing starts while link_full is set
    fc_en = 1; link_full = 1;
    q_addr.push_back(8'd9); q_flags.push_back(3'd0);
    repeat (50) @(negedge clk);
    chk("flow control holds event", q_addr.size() == 1);
    link_full = 0;
    repeat (20) @(negedge clk);
    chk("event starts after link_full drops", q_addr.size() == 0);
    chk("stall seen", n_stall >= 40);
    chk("delays checked", n_delay_checked >= 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
