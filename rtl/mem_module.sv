// mem_module: the shared MEMORY module, 64k words of 16 bits.
//
// A common memory reached by all processors over a cable on a request/grant
// basis, for tables too large for a processor's own work memory (gates),
// values that change during processing (a software-stabilised gain), or
// histograms.  Each processor port raises req with we, addr and wdata held;
// the module grants one request per access in round-robin order after the
// last port served, performs the access at the grant edge, and answers with a
// one-clock ack (with rdata for a read) in the next clock.  No new grant is
// made in a clock that carries an ack, so a port that keeps req high for its
// next access is not served twice for one request.  A host port (via the
// crate controller, to place constants in the memory) has priority over the
// processors and uses the same grant/ack cycle.
//
// The 64k x 16 size and the request/grant access follow the system
// description; the round-robin order, the host port and the two-clock access
// are this design's own.  n_contend counts grants made while more than one
// port requested (observation only).  Synchronous reset; memory not reset.
module mem_module
  import pps_pkg::*;
#(
  parameter int unsigned NPROC = 4,
  parameter int unsigned WORDS = 65536
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [NPROC-1:0]   req,
  input  logic [NPROC-1:0]   we,
  input  logic [DATA_W-1:0]  addr  [NPROC],
  input  logic [DATA_W-1:0]  wdata [NPROC],
  output logic [NPROC-1:0]   ack,
  output logic [DATA_W-1:0]  rdata,
  input  logic               h_req,
  input  logic               h_we,
  input  logic [DATA_W-1:0]  h_addr,
  input  logic [DATA_W-1:0]  h_wdata,
  output logic               h_ack,
  output logic [31:0]        n_contend
);
  localparam int unsigned IW = (NPROC > 1) ? $clog2(NPROC) : 1;
  localparam int unsigned AW = $clog2(WORDS);

  logic [DATA_W-1:0] mem [WORDS];
  logic [IW-1:0]     last, pick;
  logic              found, busy, h_go, p_go;
  logic [DATA_W-1:0] g_addr, g_wdata;
  logic              g_we;
  int unsigned       nreq;

  assign busy = (|ack) || h_ack;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    nreq  = 0;
    for (int off = 1; off <= NPROC; off++) begin
      int unsigned k;
      k = (int'(last) + off) % NPROC;
      if (req[k]) begin
        nreq++;
        if (!found) begin found = 1'b1; pick = IW'(k); end
      end
    end
  end

  assign h_go    = !busy && h_req;
  assign p_go    = !busy && !h_req && found;
  assign g_addr  = h_go ? h_addr  : addr[pick];
  assign g_wdata = h_go ? h_wdata : wdata[pick];
  assign g_we    = h_go ? h_we    : we[pick];

  always_ff @(posedge clk) begin
    if (rst) begin
      ack <= '0; h_ack <= 1'b0; last <= IW'(NPROC - 1); n_contend <= '0;
    end else begin
      ack   <= '0;
      h_ack <= h_go;
      if (p_go) begin
        ack[pick] <= 1'b1;
        last      <= pick;
        if (nreq > 1) n_contend <= n_contend + 1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (h_go || p_go) begin
      if (g_we) mem[g_addr[AW-1:0]] <= g_wdata;
      else      rdata <= mem[g_addr[AW-1:0]];
    end
  end

endmodule
