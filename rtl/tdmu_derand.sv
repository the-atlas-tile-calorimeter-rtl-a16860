// Derandomizer (readout buffers) of the Tile-DMU.
//
// On a level-1 accept the time frame of frame_len_m1+1 consecutive samples
// leaving the pipeline, starting with the one present in the accept's clock,
// is copied into a dual-port buffer memory. The buffers are not fixed slots:
// the memory is written as a ring and the start address of every frame is
// kept in the address FIFO (the document's memory-pointer scheme). An accept
// that arrives while a frame is still being copied simply extends the copy,
// so overlapping frames share the samples they have in common. When the last
// sample of a frame has been written, its start address is pushed into the
// address FIFO and the frame's three gain flags (from tdmu_gain_select) into
// the flag FIFO, in the same clock.
//
// Capacity: the memory holds MEM_DEPTH words and the FIFOs N_BUF entries, so
// floor(MEM_DEPTH / frame length), at most N_BUF, events may be waiting; with
// the defaults that is 16 events of 16 samples up to 32 events of 8 samples
// or fewer, the document's "between 16 and 32" buffers. An event stays counted
// until the readout controller pulses `release` after reading it. An accept
// arriving when the buffers are full is refused and `lost` pulses. The frame
// length must not be changed while events are waiting.
//
// Read port: rd_addr in one clock, rd_data the next (synchronous RAM).
module tdmu_derand
  import tdmu_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 256,
  parameter int unsigned N_BUF     = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [3:0]                   frame_len_m1,
  input  logic                         l1a,
  input  logic [WORD_BITS-1:0]         sample,
  input  logic [N_CH-1:0]              frame_flags,
  // readout side
  output logic                         evt_avail,
  output logic [$clog2(MEM_DEPTH)-1:0] evt_addr,
  output logic [N_CH-1:0]              evt_flags,
  input  logic                         evt_pop,
  input  logic                         release_evt,
  input  logic [$clog2(MEM_DEPTH)-1:0] rd_addr,
  output logic [WORD_BITS-1:0]         rd_data,
  // status
  output logic                         lost,
  output logic [$clog2(N_BUF):0]       occupied,
  output logic                         busy,
  output logic                         dyn_par
);
  localparam int unsigned AW = $clog2(MEM_DEPTH);
  localparam int unsigned CW = $clog2(N_BUF) + 1;

  logic [WORD_BITS-1:0] mem [MEM_DEPTH];
  logic [AW-1:0]        wr_ptr;
  logic [3:0]           remaining;
  logic [MAX_FRAME-2:0] acc_hist;   // acc_hist[j]: accept taken j+1 clocks ago
  logic                 accept, we, frame_done;
  logic [CW-1:0]        max_evts;
  logic [AW-1:0]        start_addr;
  logic                 af_empty, ff_empty, af_full, ff_full;
  logic [CW-1:0]        af_count, ff_count;
  logic                 af_par, ff_par;
  logic [N_CH-1:0]      ff_rdata;

  // floor(MEM_DEPTH / frame length), limited to N_BUF.
  always_comb begin
    int unsigned n;
    n = MEM_DEPTH / (int'(frame_len_m1) + 1);
    max_evts = (n > N_BUF) ? CW'(N_BUF) : CW'(n);
  end

  assign accept = l1a && (occupied < max_evts);
  assign lost   = l1a && !accept;
  assign we     = accept || (remaining != 0);

  always_comb begin
    frame_done = 1'b0;
    if (frame_len_m1 == 0) frame_done = accept;
    else                   frame_done = acc_hist[frame_len_m1 - 1'b1];
  end
  assign start_addr = wr_ptr - AW'(frame_len_m1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      remaining <= '0;
      acc_hist  <= '0;
      occupied  <= '0;
    end else begin
      if (we) wr_ptr <= wr_ptr + 1'b1;
      if (accept)              remaining <= frame_len_m1;
      else if (remaining != 0) remaining <= remaining - 1'b1;
      acc_hist <= {acc_hist[MAX_FRAME-3:0], accept};
      occupied <= occupied + CW'(accept) - CW'(release_evt);
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[wr_ptr] <= sample;
    rd_data <= mem[rd_addr];
  end

  tdmu_fifo #(.WIDTH(AW), .DEPTH(N_BUF)) u_addr_fifo (
    .clk, .rst_n, .push(frame_done), .wdata(start_addr), .pop(evt_pop),
    .rdata(evt_addr), .empty(af_empty), .full(af_full), .count(af_count), .dyn_par(af_par));

  tdmu_fifo #(.WIDTH(N_CH), .DEPTH(N_BUF)) u_flag_fifo (
    .clk, .rst_n, .push(frame_done), .wdata(frame_flags), .pop(evt_pop),
    .rdata(ff_rdata), .empty(ff_empty), .full(ff_full), .count(ff_count), .dyn_par(ff_par));

  assign evt_flags = ff_rdata;
  assign evt_avail = !af_empty;
  assign busy      = (occupied != 0) || (remaining != 0);
  assign dyn_par   = ^{wr_ptr, remaining, occupied} ^ af_par ^ ff_par;

  a_fifos_in_step: assert property (@(posedge clk) disable iff (!rst_n) af_count == ff_count);
  a_flags_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                    af_empty == ff_empty && af_full == ff_full);
  a_release_valid: assert property (@(posedge clk) disable iff (!rst_n) release_evt |-> occupied != 0);
endmodule
