// output_module: the FIFO-OUTPUT module (CAMAC), event collection.
//
// It collects the processed events from the processors' output registers into
// a FIFO read either by the host over the CAMAC dataway (host_rd strobe) or
// through the front-panel output port (fp_valid/fp_ready), chosen by fp_mode.
// The module decides which processor it serves, and once it has started on a
// processor it takes that processor's entire event (up to the word marked
// end-of-event) before serving another.  The choice of the next processor
// mixes first-come-first-served and round-robin: every processor with a word
// waiting ages by one each clock it waits; the oldest waiting processor is
// served next, and processors that started waiting in the same clock (equal
// age) are taken in round-robin order after the last one served.  No
// processor can therefore be locked out by the others.  Events may leave in a
// different order from the one they entered in.
//
// The 4k-word minimum FIFO, the whole-event service, the mixed
// first-come-first-served/round-robin policy and the two read paths follow
// the system description; the age counters that realise the policy, the
// end-of-event flag and the port handshakes are this design's own.
// Timing: single clock, synchronous reset; at most one word per clock in and
// one out.  n_multi_wait counts service decisions taken while more than one
// processor was waiting (observation only).
module output_module
  import pps_pkg::*;
#(
  parameter int unsigned NPROC      = 4,
  parameter int unsigned FIFO_DEPTH = 4096,
  parameter int unsigned AGE_W      = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [NPROC-1:0]         p_valid,
  input  logic [DATA_W-1:0]        p_data [NPROC],
  input  logic [NPROC-1:0]         p_eoe,
  output logic [NPROC-1:0]         p_ready,
  // FIFO read side
  input  logic                     fp_mode,
  output logic                     fp_valid,
  output logic [DATA_W-1:0]        fp_data,
  output logic                     fp_eoe,
  input  logic                     fp_ready,
  input  logic                     host_rd,
  output logic [DATA_W-1:0]        host_rdata,
  output logic                     host_reoe,
  output logic                     fifo_empty,
  output logic [$clog2(FIFO_DEPTH):0] fifo_count,
  output logic [31:0]              n_multi_wait
);
  localparam int unsigned IW = (NPROC > 1) ? $clog2(NPROC) : 1;

  logic [AGE_W-1:0] age [NPROC];
  logic             busy, found;
  logic [IW-1:0]    cur, last, pick;
  logic             f_wr, f_rd, f_full;
  logic [DATA_W:0]  f_rdata;
  int unsigned      nwait;

  // ---------------------------------------------------------------- choice
  always_comb begin
    logic [AGE_W-1:0] best;
    found = 1'b0;
    pick  = '0;
    best  = '0;
    nwait = 0;
    for (int off = 1; off <= NPROC; off++) begin
      int unsigned k;
      k = (int'(last) + off) % NPROC;
      if (p_valid[k]) begin
        nwait++;
        if (!found || age[k] > best) begin
          found = 1'b1;
          pick  = IW'(k);
          best  = age[k];
        end
      end
    end
  end

  // ---------------------------------------------------------------- transfer
  assign f_wr = busy && p_valid[cur] && !f_full;

  always_comb begin
    p_ready = '0;
    if (f_wr) p_ready[cur] = 1'b1;
  end

  sync_fifo #(.WIDTH(DATA_W + 1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr_en(f_wr), .wr_data({p_eoe[cur], p_data[cur]}),
    .rd_en(f_rd), .rd_data(f_rdata), .empty(fifo_empty), .full(f_full), .count(fifo_count)
  );

  assign fp_valid   = fp_mode && !fifo_empty;
  assign fp_data    = f_rdata[DATA_W-1:0];
  assign fp_eoe     = f_rdata[DATA_W];
  assign host_rdata = f_rdata[DATA_W-1:0];
  assign host_reoe  = f_rdata[DATA_W];
  assign f_rd       = fp_mode ? (fp_valid && fp_ready) : host_rd;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; cur <= '0; last <= IW'(NPROC - 1); n_multi_wait <= '0;
      for (int k = 0; k < NPROC; k++) age[k] <= '0;
    end else begin
      for (int k = 0; k < NPROC; k++) begin
        if (!p_valid[k] || (busy && cur == IW'(k))) age[k] <= '0;
        else if (age[k] != '1)                     age[k] <= age[k] + 1'b1;
      end
      if (!busy) begin
        if (found) begin
          busy <= 1'b1; cur <= pick; last <= pick;
          age[pick] <= '0;
          if (nwait > 1) n_multi_wait <= n_multi_wait + 1;
        end
      end else if (f_wr && p_eoe[cur]) begin
        busy <= 1'b0;
      end
    end
  end

endmodule
