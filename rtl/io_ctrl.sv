// io_ctrl: instruction interface of the dictionary machine at the I/O processor (processor 0).
//
// Instructions arrive one per cycle at most on a valid/ready handshake. Insert, Delete and
// Extract Min become snake tokens (tok_o); Search becomes a broadcast-net message (srch_o);
// Find Min is answered here from the head cell of the snake, which always holds the minimum.
// Both tok_o and srch_o are registers, loaded in the cycle the instruction is accepted.
// The controller holds an instruction back (in_ready = 0) when issuing it now could give a
// wrong result:
//   * snake tokens, and Find Min after a token, keep SNAKE_GAP = 2 cycles apart, so that a
//     record that moves up after a deletion is in place before the next token arrives;
//   * an Insert/Delete/Extract Min waits US_GAP = D+7 cycles after a Search, the time until
//     the Search has compared its key at the head cell;
//   * a Search waits SU_GAP cycles after the last snake token, until every cell has finished
//     that token before the Search compares its key there. A token changes the cell at snake
//     position s at clock edge s+1 after acceptance (s+2 for a refilled hole); a Search
//     compares at the processor of broadcast distance t in the state after edge D+7-t, so
//     SU_GAP = max over s of (s + t(s) - D - 5), one less at the tail, which empties instead
//     of leaving a hole (117 cycles for D = 7).
// Searches follow each other every cycle and updates every second cycle, as in the
// published design. The two waiting rules are this design's own replacement for the
// per-processor bookkeeping that lets the published design overlap Searches with updates.
// Find Min answer (fm_o): valid one cycle after acceptance; fm_o.found = 0 when the dictionary is
// empty. in_ready depends on in_i.op and on the cycles since the last token and Search.
module io_ctrl
  import dict_pkg::*;
#(
  parameter int D = 7
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  instr_t in_i,
  output tok_t   tok_o,       // to the snake head
  output smsg_t  srch_o,      // to the broadcast net at processor 0
  input  rec_t   head_rec_i,  // snake head record
  output rmsg_t  fm_o         // Find Min answer (one-cycle valid pulse)
);

  function automatic int su_gap();
    int g, best;
    best = 1;
    for (int s = 0; s < (1 << D); s++) begin
      g = s + bcast_dist(snake_node(s)) - D - ((s == (1 << D) - 1) ? 6 : 5);
      if (g > best) best = g;
    end
    return best;
  endfunction

  localparam int SNAKE_GAP = 2;
  localparam int US_GAP    = D + 7;
  localparam int SU_GAP    = su_gap();
  localparam int CW        = $clog2((1 << D) + 2) + 1;
  localparam logic [CW-1:0] CMAX = '1;

  logic [CW-1:0] since_tok, since_srch;
  logic          fm_pend;
  logic          is_upd, accept;

  assign is_upd = (in_i.op == OP_INSERT) || (in_i.op == OP_DELETE) || (in_i.op == OP_XMIN);

  always_comb begin
    unique case (in_i.op)
      OP_INSERT, OP_DELETE, OP_XMIN:
        in_ready = (since_tok >= CW'(SNAKE_GAP)) && (since_srch >= CW'(US_GAP));
      OP_FINDMIN: in_ready = (since_tok >= CW'(SNAKE_GAP));
      OP_SEARCH:  in_ready = (since_tok >= CW'(SU_GAP));
      default:    in_ready = 1'b1;   // unknown opcodes are dropped
    endcase
  end

  assign accept = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      since_tok  <= CMAX;
      since_srch <= CMAX;
      fm_pend    <= 1'b0;
      tok_o      <= '{kind: TK_NONE, key: '0, data: '0};
      srch_o     <= '0;
      fm_o       <= '0;
    end else begin
      tok_o   <= '{kind: TK_NONE, key: '0, data: '0};
      srch_o  <= '0;
      fm_pend <= accept && (in_i.op == OP_FINDMIN);
      if (since_tok != CMAX)  since_tok  <= since_tok + 1'b1;
      if (since_srch != CMAX) since_srch <= since_srch + 1'b1;
      if (accept) begin
        unique case (in_i.op)
          OP_INSERT: tok_o <= '{kind: TK_INS,  key: in_i.key, data: in_i.data};
          OP_DELETE: tok_o <= '{kind: TK_DEL,  key: in_i.key, data: '0};
          OP_XMIN:   tok_o <= '{kind: TK_XMIN, key: '0,       data: '0};
          OP_SEARCH: srch_o <= '{valid: 1'b1, key: in_i.key};
          default: ;
        endcase
        if (is_upd)                 since_tok  <= CW'(1);
        if (in_i.op == OP_SEARCH)   since_srch <= CW'(1);
      end
      // Find Min: read the head one cycle after acceptance, when every earlier token has
      // left it and any hole there has been refilled.
      fm_o <= '0;
      if (fm_pend)
        fm_o <= '{valid: 1'b1, key: head_rec_i.key, found: head_rec_i.valid,
                  data: head_rec_i.data};
    end
  end

endmodule
