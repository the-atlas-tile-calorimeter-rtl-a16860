// Serializer test: events of random length are sent word by word; the stream
// is decoded by an independent receiver that checks the "11" start pair, the
// words, the CRC-16 and the "00" end pair. Also checks the event duration
// (16 clocks per word + 8 CRC clocks + end pair), one S-link write strobe per
// word and the control flag on the first word only.
module tdmu_serializer_tb;
  logic clk = 0, rst_n = 1;
  logic [31:0] word;
  logic word_valid = 0, word_ctrl = 0, word_last = 0, word_ready;
  logic [1:0] sdata;
  logic link_wen, link_ctrl, busy, underrun;
  longint cyc = 0;
  int checks = 0, failures = 0;
  int n_words;
  logic rx_done, crc_ok, end_ok;
  logic [31:0] rx_words [40];
  longint t0, t1;
  int n_wen = 0, n_ctrl = 0;
  logic [31:0] sent [$];

  tdmu_serializer dut (.*);
  tdmu_stream_rx rx (.clk, .rst_n, .sdata, .n_words, .cycle(cyc), .done(rx_done), .words(rx_words),
    .crc_ok, .end_ok, .start_cycle(t0), .end_cycle(t1));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (link_wen) n_wen++;
    if (link_ctrl) n_ctrl++;
    if (link_ctrl && !link_wen) begin failures++; $display("ctrl without wen"); end
    if (underrun) begin failures++; $display("underrun"); end
  end

  initial #1 rst_n = 1'b0;  // falling edge for the asynchronous reset

  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++; if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int e = 0; e < 40; e++) begin
      n_words = $urandom_range(2, 33);
      sent.delete();
      n_wen = 0; n_ctrl = 0;
      repeat ($urandom_range(0, 5)) @(negedge clk);
      for (int w = 0; w < n_words; w++) begin
        word = $urandom; word_valid = 1; word_ctrl = (w == 0); word_last = (w == n_words - 1);
        sent.push_back(word);
        #1; while (!word_ready) begin @(negedge clk); #1; end
        @(negedge clk);   // taken at the rising edge in between
        word_valid = 0;
        if (w < n_words - 1) repeat ($urandom_range(0, 10)) @(negedge clk);
      end
      @(posedge rx_done); @(negedge clk);
      for (int w = 0; w < n_words; w++) chk($sformatf("word %0d", w), rx_words[w] == sent[w]);
      chk("crc", crc_ok);
      chk("end pair", end_ok);
      chk("duration", t1 - t0 == longint'(16 * n_words + 9));
      chk("wen count", n_wen == n_words);
      chk("ctrl count", n_ctrl == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
