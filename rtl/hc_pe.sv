// hc_pe: one processor of the hypercube dictionary machine.
//
// Every processor holds one snake cell (one record of the systolic priority queue) and one
// broadcast-net stage; the sub-hypercube roots (processor number with bits 3..0 zero) also
// hold the global Search queue. The processor talks to its D hypercube neighbours over one
// link per dimension in each direction (link_i / link_o, bit b of the processor number =
// dimension b). Which dimension carries which traffic is fixed at elaboration from the
// processor number ID by the embedding functions of dict_pkg:
//   * snake predecessor / successor: snake_prev_dim / snake_next_dim (token forward,
//     record backward); processor 0 is the snake head and takes its tokens from tok_i;
//   * broadcast net: G1 parents and children inside the sub-hypercube, and the global
//     binomial tree between roots (bnet_queue); processor 0 takes new Searches from srch_i
//     and delivers the answers on result_o.
// The two embeddings never share a link, so each link carries either snake or broadcast
// traffic. Timing is that of the three parts; a link adds no delay of its own.
// The split of work follows the published design; the link bundle is this design's own.
module hc_pe
  import dict_pkg::*;
#(
  parameter int D  = 7,
  parameter int ID = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t link_i [D],   // from the neighbour across each dimension
  output link_t link_o [D],   // to the neighbour across each dimension
  input  tok_t  tok_i,        // processor 0: snake instruction from the I/O controller
  input  smsg_t srch_i,       // processor 0: Search message from the I/O controller
  output rec_t  rec_o,        // this processor's snake record (head: the minimum)
  output logic  hole_o,       // snake record is being refilled
  output rmsg_t result_o,     // processor 0: Search answer
  output logic  overflow_o    // snake tail: an insertion found no free cell
);

  localparam int PREV = snake_prev_dim(ID);
  localparam int NEXT = snake_next_dim(ID, D);
  localparam bit IS_ROOT = ((ID & 15) == 0);

  // ---------------------------------------------------------------- snake cell
  tok_t cell_tok_i, cell_tok_o;
  rec_t cell_up_i, cell_rec;
  logic cell_hole;

  if (PREV < 0) begin : g_head
    assign cell_tok_i = tok_i;
  end else begin : g_mid
    assign cell_tok_i = link_i[PREV].tok;
  end

  if (NEXT < 0) begin : g_tail
    assign cell_up_i = '0;
  end else begin : g_body
    assign cell_up_i = link_i[NEXT].up;
  end

  snake_cell #(.IS_LAST(NEXT < 0)) u_cell (
    .clk        (clk),
    .rst_n      (rst_n),
    .tok_i      (cell_tok_i),
    .up_i       (cell_up_i),
    .tok_o      (cell_tok_o),
    .rec_o      (cell_rec),
    .hole_o     (cell_hole),
    .overflow_o (overflow_o)
  );

  assign rec_o  = cell_rec;
  assign hole_o = cell_hole;

  // ---------------------------------------------------------------- broadcast net
  smsg_t node_fwd_o [D], q_fwd_o [D], fwd_i [D];
  rmsg_t node_rev_o [D], q_rev_o [D], rev_i [D];
  smsg_t root_msg;
  rmsg_t root_rv;

  for (genvar b = 0; b < D; b++) begin : g_unpack
    assign fwd_i[b] = link_i[b].fwd;
    assign rev_i[b] = link_i[b].rev;
  end

  bnet_node #(.D(D), .ID(ID)) u_node (
    .clk    (clk),
    .rst_n  (rst_n),
    .root_i (root_msg),
    .fwd_i  (fwd_i),
    .fwd_o  (node_fwd_o),
    .rec_i  (cell_rec),
    .hole_i (cell_hole),
    .rev_i  (rev_i),
    .rev_o  (node_rev_o),
    .rv_o   (root_rv)
  );

  if (IS_ROOT) begin : g_root
    bnet_queue #(.D(D), .ID(ID)) u_queue (
      .clk       (clk),
      .rst_n     (rst_n),
      .io_i      (srch_i),
      .fwd_i     (fwd_i),
      .fwd_o     (q_fwd_o),
      .root_o    (root_msg),
      .root_rv_i (root_rv),
      .rev_i     (rev_i),
      .rev_o     (q_rev_o),
      .result_o  (result_o)
    );
  end else begin : g_leaf
    for (genvar b = 0; b < D; b++) begin : g_z
      assign q_fwd_o[b] = '0;
      assign q_rev_o[b] = '0;
    end
    assign root_msg = '0;
    assign result_o = '0;
  end

  // ---------------------------------------------------------------- links
  for (genvar b = 0; b < D; b++) begin : g_link
    assign link_o[b].tok = (b == NEXT) ? cell_tok_o : '0;
    assign link_o[b].up  = (b == PREV) ? cell_rec   : '0;
    assign link_o[b].fwd = (b < SUB_BITS) ? node_fwd_o[b] : q_fwd_o[b];
    assign link_o[b].rev = (b < SUB_BITS) ? node_rev_o[b] : q_rev_o[b];
  end

endmodule
