// Derandomizer test: samples carry their clock number as a tag, accepts come
// at random (often inside a running frame, so frames overlap), and a reader
// drains the events, sometimes pausing so the buffers fill up. Checks every
// sample of every frame, the gain flags stored with it, the refusal of
// accepts when floor(256/N) (at most 32) events wait, and the event count.
module tdmu_derand_tb;
  import tdmu_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [3:0] frame_len_m1;
  logic l1a = 0;
  logic [63:0] sample = 0;
  logic [2:0] frame_flags = 0;
  logic evt_avail, evt_pop = 0, release_evt = 0, lost, busy, dyn_par;
  logic [7:0] evt_addr, rd_addr = 0;
  logic [2:0] evt_flags;
  logic [63:0] rd_data;
  logic [5:0] occupied;
  int checks = 0, failures = 0;
  int cyc = 0;
  int acc_q [$];            // clock numbers of accepted level-1 accepts
  logic [2:0] flags_at [int];
  int occ_model = 0, n_lost = 0, n_overlap = 0, n_read = 0;
  bit reader_on = 1;
  int N;

  tdmu_derand dut (.clk, .rst_n, .frame_len_m1, .l1a, .sample, .frame_flags, .evt_avail,
    .evt_addr, .evt_flags, .evt_pop, .release_evt, .rd_addr, .rd_data, .lost, .occupied,
    .busy, .dyn_par);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  initial begin
    repeat (60000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; if (failures < 8) $display("FAIL %s @%0d", what, cyc); end
  endtask

  // driver: one iteration per clock, inputs change at the falling edge
  task automatic run_phase(input int len, input int cycles, input int l1a_pct, input bit rd_on);
    int max_evts;
    int last_acc = -100;
    frame_len_m1 = 4'(len - 1);
    N = len;
    max_evts = (256 / len > 32) ? 32 : 256 / len;
    reader_on = rd_on;
    for (int t = 0; t < cycles; t++) begin
      @(negedge clk);
      sample = 64'(cyc);
      frame_flags = 3'($urandom);
      flags_at[cyc] = frame_flags;
      l1a = ($urandom_range(0, 99) < l1a_pct);
      #1;
      if (l1a) begin
        chk("lost flag", lost == (occ_model >= max_evts));
        if (!lost) begin
          if (cyc - last_acc < len) n_overlap++;
          last_acc = cyc;
          acc_q.push_back(cyc);
          occ_model++;
        end else n_lost++;
      end
    end
    @(negedge clk); l1a = 0;
  endtask

  // reader
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (reader_on && evt_avail) begin
        int start, base;
        start = acc_q.pop_front();
        base  = evt_addr;
        chk("flags", evt_flags == flags_at[start + N - 1]);
        evt_pop = 1;
        for (int i = 0; i < N; i++) begin
          rd_addr = 8'(base + i);
          @(negedge clk); evt_pop = 0;
          chk($sformatf("sample %0d of frame at %0d", i, start), rd_data == 64'(start + i));
        end
        release_evt = 1;
        @(negedge clk); release_evt = 0;
        occ_model--;
        n_read++;
      end
    end
  end

  initial begin
    frame_len_m1 = 15;
    repeat (2) @(negedge clk); rst_n = 1;
    run_phase(16, 3000, 3, 1);
    run_phase(16, 800, 10, 0);   // no readout: fill all 16 buffers
    chk("occupied at 16-sample frames", occupied == 16);
    reader_on = 1; wait (occupied == 0 && !busy);
    run_phase(5, 4000, 8, 1);
    run_phase(5, 1500, 12, 0);   // fill: 32 buffers at 5 samples
    chk("occupied at 5-sample frames", occupied == 32);
    reader_on = 1; wait (occupied == 0 && !busy);
    run_phase(1, 2000, 20, 1);
    reader_on = 1; wait (occupied == 0 && !busy);
    repeat (5) @(negedge clk);
    chk("all events read", acc_q.size() == 0);
    chk("some overlap", n_overlap > 10);
    chk("some lost", n_lost > 5);
    $display("events read %0d, overlapping %0d, refused %0d", n_read, n_overlap, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
