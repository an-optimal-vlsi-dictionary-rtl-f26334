// snake_cell: one cell of the snake, a systolic priority queue laid along the hypercube.
//
// The snake keeps the dictionary sorted: the cell at snake position 0 (the I/O processor)
// holds the smallest key, and occupied cells form a prefix of the snake. Instructions enter
// at the head as tokens and move one cell per clock toward the tail:
//   TK_INS   empty cell: store the record. Same key: drop the token (duplicate insertion is
//            ignored). Smaller key: store it and carry the displaced record on. Otherwise
//            pass the token on unchanged.
//   TK_DEL   same key: the cell becomes a hole and sends TK_SHIFT on. Empty cell or a larger
//            key: the key is absent, drop the token (redundant deletion is ignored).
//   TK_XMIN  delete whatever this cell holds (Extract Min, used at the head only).
//   TK_SHIFT my predecessor is a hole: it copies my record this cycle (port rec_o); if I hold
//            a record I become a hole and send TK_SHIFT on, else the token ends.
// A hole reloads from its successor in the next cycle, when the successor is handling the
// TK_SHIFT (input up_i). The tail cell (IS_LAST) empties instead of becoming a hole, and a
// TK_INS it cannot keep is lost and flagged on overflow_o.
// Timing: tok_o and the cell record are registers; a token spends one cycle per cell.
// Tokens must enter at least two cycles apart, which keeps every hole filled before the next
// token reaches it. Insert/Delete/Extract Min semantics and the handling of duplicates follow
// the published design; the token encoding and the hole protocol are this design's own.
module snake_cell
  import dict_pkg::*;
#(
  parameter bit IS_LAST = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  tok_t tok_i,       // token from the predecessor (or the I/O controller at the head)
  input  rec_t up_i,        // successor's record, loaded while this cell is a hole
  output tok_t tok_o,       // token to the successor
  output rec_t rec_o,       // this cell's record (to the predecessor and the broadcast net)
  output logic hole_o,      // cell is waiting for its successor's record
  output logic overflow_o   // tail only: an insertion found no free cell (one-cycle pulse)
);

  rec_t rec_q, rec_d;
  logic hole_q, hole_d;
  tok_t tok_q, tok_d;
  logic ovf_d, ovf_q;

  always_comb begin
    rec_d  = rec_q;
    hole_d = 1'b0;
    tok_d  = '{kind: TK_NONE, key: '0, data: '0};
    ovf_d  = 1'b0;

    if (hole_q) begin
      // Successor is handling TK_SHIFT this cycle and shows its record on up_i.
      rec_d = up_i;
    end

    unique case (tok_i.kind)
      TK_INS: begin
        if (!rec_q.valid) begin
          rec_d = '{valid: 1'b1, key: tok_i.key, data: tok_i.data};
        end else if (tok_i.key == rec_q.key) begin
          // duplicate insertion: ignored
        end else if (tok_i.key < rec_q.key) begin
          rec_d = '{valid: 1'b1, key: tok_i.key, data: tok_i.data};
          tok_d = '{kind: TK_INS, key: rec_q.key, data: rec_q.data};
        end else begin
          tok_d = tok_i;
        end
      end
      TK_DEL, TK_XMIN: begin
        if (rec_q.valid && (tok_i.kind == TK_XMIN || tok_i.key == rec_q.key)) begin
          if (IS_LAST) begin
            rec_d = '0;
          end else begin
            hole_d = 1'b1;
            tok_d  = '{kind: TK_SHIFT, key: '0, data: '0};
          end
        end else if (rec_q.valid && tok_i.kind == TK_DEL && tok_i.key > rec_q.key) begin
          tok_d = tok_i;
        end
      end
      TK_SHIFT: begin
        // Predecessor takes rec_q this cycle.
        if (rec_q.valid) begin
          if (IS_LAST) begin
            rec_d = '0;
          end else begin
            hole_d = 1'b1;
            tok_d  = '{kind: TK_SHIFT, key: '0, data: '0};
          end
        end
      end
      default: ;
    endcase

    if (IS_LAST && tok_d.kind == TK_INS) begin
      ovf_d = 1'b1;
      tok_d = '{kind: TK_NONE, key: '0, data: '0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_q  <= '0;
      hole_q <= 1'b0;
      tok_q  <= '{kind: TK_NONE, key: '0, data: '0};
      ovf_q  <= 1'b0;
    end else begin
      rec_q  <= rec_d;
      hole_q <= hole_d;
      tok_q  <= tok_d;
      ovf_q  <= ovf_d;
    end
  end

  assign tok_o      = tok_q;
  assign rec_o      = rec_q;
  assign hole_o     = hole_q;
  assign overflow_o = ovf_q;

  // A token never arrives while the cell is still a hole (tokens are two cycles apart).
  a_no_token_on_hole: assert property (@(posedge clk) disable iff (!rst_n)
    hole_q |-> (tok_i.kind == TK_NONE));

endmodule
