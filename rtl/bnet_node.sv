// bnet_node: the broadcast-net stage of one processor inside its 16-processor sub-hypercube.
//
// Forward (graph G1): the Search(k) message reaches the sub-hypercube root x..x0000 at step 0
// and every processor at the step printed for it in the sub-hypercube drawing of the design
// (table dict_pkg::bcast_dist, 0..5). Register bc_q holds the message one cycle and passes it
// to the G1 children on the links chosen by dict_pkg::g1_child. When several parents send in
// the same cycle they carry the same key.
// Reverse (graph G2 = G1 with every edge turned round): the two sinks (distance 5) compare
// the key with their own snake record and start the answer <k,v,r>; every other processor
// waits for its children's answers, compares the key they carry with its own record, merges
// (v = OR, r = the record that matched) and passes the answer to its G1 parents. The root's
// answer (rv_o) goes on to the global reverse queue.
// Timing: a processor at distance t registers the message t cycles after the root and its
// answer 11-t cycles after the root; the root's answer is ready 11 cycles after the root
// received the message. A new Search may follow every cycle.
// The graphs and distances follow the published design; comparing on the reverse pass, so
// that no processor has to store a pending result, is this design's own choice.
module bnet_node
  import dict_pkg::*;
#(
  parameter int D  = 7,
  parameter int ID = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  smsg_t root_i,          // root only: message that starts the broadcast
  input  smsg_t fwd_i [D],       // G1 messages received on each link dimension
  output smsg_t fwd_o [D],       // G1 messages sent on each link dimension
  input  rec_t  rec_i,           // this processor's snake record
  input  logic  hole_i,          // the snake record is being replaced this cycle
  input  rmsg_t rev_i [D],       // G2 answers received on each link dimension
  output rmsg_t rev_o [D],       // G2 answers sent on each link dimension
  output rmsg_t rv_o             // this processor's answer register
);

  localparam int  V       = ID & 15;
  localparam int  DIST    = bcast_dist(V);
  localparam bit  IS_ROOT = (DIST == 0);
  localparam bit  IS_SINK = (DIST == SINK_DIST);

  smsg_t bc_q, bc_d;
  rmsg_t rv_q, rv_d;
  smsg_t par_m [SUB_BITS+1];   // running merge of the parents' messages
  rmsg_t chl_m [SUB_BITS+1];   // running merge of the children's answers

  assign par_m[0] = '0;
  assign chl_m[0] = '0;
  for (genvar b = 0; b < SUB_BITS; b++) begin : g_merge
    assign par_m[b+1] = g1_parent(V, b) ? smsg_merge(par_m[b], fwd_i[b]) : par_m[b];
    assign chl_m[b+1] = g1_child(V, b)  ? rmsg_merge(chl_m[b], rev_i[b]) : chl_m[b];
  end

  for (genvar b = 0; b < D; b++) begin : g_links
    if (b < SUB_BITS) begin : g_loc
      assign fwd_o[b] = g1_child(V, b)  ? bc_q : '0;
      assign rev_o[b] = g1_parent(V, b) ? rv_q : '0;
    end else begin : g_glob
      assign fwd_o[b] = '0;
      assign rev_o[b] = '0;
    end
  end

  always_comb begin
    rmsg_t own;
    bc_d = IS_ROOT ? root_i : par_m[SUB_BITS];
    own  = '0;
    if (IS_SINK) begin
      own.valid = bc_q.valid;
      own.key   = bc_q.key;
    end else begin
      own.valid = chl_m[SUB_BITS].valid;
      own.key   = chl_m[SUB_BITS].key;
    end
    if (own.valid && rec_i.valid && !hole_i && rec_i.key == own.key) begin
      own.found = 1'b1;
      own.data  = rec_i.data;
    end
    rv_d = IS_SINK ? own : rmsg_merge(own, chl_m[SUB_BITS]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc_q <= '0;
      rv_q <= '0;
    end else begin
      bc_q <= bc_d;
      rv_q <= rv_d;
    end
  end

  assign rv_o = rv_q;

endmodule
