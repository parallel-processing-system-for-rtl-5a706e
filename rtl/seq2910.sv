// seq2910: microprogram sequencer, functionally compatible with the Am2910.
//
// It produces the 12-bit address Y of the next microinstruction from one of
// four sources: the direct input D (branch address from the pipeline
// register), the internal register/counter R, the top of a 5-deep subroutine
// stack F, or the microprogram counter uPC (last Y plus the carry-in CI).  Its
// 16 instructions give absolute and conditional jumps, subroutine calls and
// returns, and counted loops.  The address width, stack depth, four address
// sources, condition input, loop counter and the instruction count follow the
// processor description; the instruction semantics are those of the Am2910
// data sheet as generally documented.
//
// Interface: i, ccen (active high here: 0 forces the condition to pass), cc
// (1 = condition true = pass), rld (1 = load R from D), ci, d.  y is
// combinational from the current state and inputs.  map_n/vect_n/pl_n select
// which external source drives D (only informative in this system).
// Timing: state (uPC, R, stack) updates on a rising clk edge when en is high,
// so the sequencer advances once per processor cycle.  Synchronous reset
// clears the stack and uPC.  A push onto a full stack overwrites the top entry;
// a pop of an empty stack leaves it empty.
module seq2910
  import pps_pkg::*;
#(
  parameter int unsigned AW    = UADDR_W,
  parameter int unsigned DEPTH = STACK_D
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  seq_op_e       i,
  input  logic          ccen,
  input  logic          cc,
  input  logic          rld,
  input  logic          ci,
  input  logic [AW-1:0] d,
  output logic [AW-1:0] y,
  output logic          full_n,
  output logic          pl_n,
  output logic          map_n,
  output logic          vect_n
);
  localparam int unsigned SPW = $clog2(DEPTH + 1);

  logic [AW-1:0]  upc, r;
  logic [AW-1:0]  stk [DEPTH];
  logic [SPW-1:0] sp;              // number of entries on the stack

  logic           pass, rzero;
  logic           push, pop, clear, ld_r, dec_r;
  logic [AW-1:0]  tos;

  assign pass  = !ccen || cc;
  assign rzero = (r == '0);
  assign tos   = (sp == 0) ? '0 : stk[sp - 1];

  always_comb begin
    y = upc; push = 1'b0; pop = 1'b0; clear = 1'b0; ld_r = 1'b0; dec_r = 1'b0;
    pl_n = 1'b0; map_n = 1'b1; vect_n = 1'b1;
    unique case (i)
      SQ_JZ:   begin y = '0; clear = 1'b1; end
      SQ_CJS:  if (pass) begin y = d; push = 1'b1; end
      SQ_JMAP: begin y = d; pl_n = 1'b1; map_n = 1'b0; end
      SQ_CJP:  if (pass) y = d;
      SQ_PUSH: begin push = 1'b1; ld_r = pass; end
      SQ_JSRP: begin push = 1'b1; y = pass ? d : r; end
      SQ_CJV:  begin pl_n = 1'b1; vect_n = 1'b0; if (pass) y = d; end
      SQ_JRP:  y = pass ? d : r;
      SQ_RFCT: if (!rzero) begin y = tos; dec_r = 1'b1; end else pop = 1'b1;
      SQ_RPCT: if (!rzero) begin y = d; dec_r = 1'b1; end
      SQ_CRTN: if (pass) begin y = tos; pop = 1'b1; end
      SQ_CJPP: if (pass) begin y = d; pop = 1'b1; end
      SQ_LDCT: ld_r = 1'b1;
      SQ_LOOP: if (pass) pop = 1'b1; else y = tos;
      SQ_CONT: ;
      SQ_TWB: begin
        if (!rzero) begin
          dec_r = 1'b1;
          if (pass) pop = 1'b1; else y = tos;
        end else begin
          pop = 1'b1;
          if (!pass) y = d;
        end
      end
      default: ;
    endcase
  end

  assign full_n = (sp != SPW'(DEPTH));

  always_ff @(posedge clk) begin
    if (rst) begin
      upc <= '0;
      r   <= '0;
      sp  <= '0;
    end else if (en) begin
      upc <= y + AW'(ci);
      if (ld_r || rld)  r <= d;
      else if (dec_r)   r <= r - 1'b1;
      if (clear) sp <= '0;
      else if (push) begin
        // the pushed value is the microprogram counter (address after this one)
        if (sp == SPW'(DEPTH)) stk[DEPTH-1] <= upc;
        else begin
          stk[sp] <= upc;
          sp      <= sp + 1'b1;
        end
      end else if (pop && sp != 0) sp <= sp - 1'b1;
    end
  end

endmodule
