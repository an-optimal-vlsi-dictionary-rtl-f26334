// dict_machine: VLSI dictionary machine on a hypercube of N = 2**D processors.
//
// Two systolic structures run side by side on the same hypercube and never share a link:
//   * the snake, a sorted systolic priority queue that passes through every processor
//     exactly once and executes Insert, Delete, Find Min and Extract Min, and
//   * the broadcast net, which spreads each Search(k) from processor 0 to every processor
//     in D+1 steps (graph G1) and collects the answer <k,v,r> back to processor 0 (G2).
// Processor 0 is the I/O processor of both. The top instantiates the N processors (hc_pe),
// joins every pair of processors whose numbers differ in one bit by a link in each direction,
// and puts the instruction controller (io_ctrl) in front of processor 0.
// Interface: in_valid/in_ready/in_i take one instruction per cycle at most; srch_o is the
// answer of each Search, in order, 2*D+4 cycles after its acceptance; fm_o is the answer of
// each Find Min, 1 cycle after its acceptance; overflow_o pulses when an Insert found the
// dictionary full (the record carried out of the snake tail is lost).
// The embeddings (sub-hypercubes of 16, the tables in dict_pkg) follow the published
// design; record widths, the link bundle and the instruction ordering rules of io_ctrl are
// this design's own choices.
module dict_machine
  import dict_pkg::*;
#(
  parameter int D = 7
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  instr_t in_i,
  output rmsg_t  srch_o,       // Search answer: key, v (found), r (record payload)
  output rmsg_t  fm_o,         // Find Min answer: minimum key and payload, found = not empty
  output logic   overflow_o,   // an insertion was lost because every cell was full
  output rec_t   cells_o [1 << D]  // record of every snake position (0 = minimum), for observation
);

  localparam int N = 1 << D;

  link_t lnk [N][D];    // lnk[i][b]: driven by processor i toward processor i ^ 2**b
  link_t lnk_in [N][D];
  rec_t  rec [N];
  logic  ovf [N];
  rmsg_t res [N];
  tok_t  head_tok;
  smsg_t head_srch;

  for (genvar i = 0; i < N; i++) begin : g_pe
    for (genvar b = 0; b < D; b++) begin : g_wire
      assign lnk_in[i][b] = lnk[i ^ (1 << b)][b];
    end

    logic hole_unused;

    hc_pe #(.D(D), .ID(i)) u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .link_i     (lnk_in[i]),
      .link_o     (lnk[i]),
      .tok_i      ((i == 0) ? head_tok  : '0),
      .srch_i     ((i == 0) ? head_srch : '0),
      .rec_o      (rec[i]),
      .hole_o     (hole_unused),
      .result_o   (res[i]),
      .overflow_o (ovf[i])
    );

    assign cells_o[snake_pos(i)] = rec[i];
  end

  io_ctrl #(.D(D)) u_io (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_i       (in_i),
    .tok_o      (head_tok),
    .srch_o     (head_srch),
    .head_rec_i (rec[0]),
    .fm_o       (fm_o)
  );

  assign srch_o     = res[0];
  assign overflow_o = ovf[snake_node(N - 1)];

endmodule
