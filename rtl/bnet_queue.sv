// bnet_queue: the global part of the broadcast net, present at every sub-hypercube root
// P_x..x0000 (processor number with bits 3..0 zero).
//
// Search messages spread over the sub-hypercube roots as a binomial tree: processor 0 sends
// to its d-neighbour, then every holder sends to its (d-1)-neighbour, and so on down to the
// 5-neighbour, so after d-4 steps every root holds the message. Each root keeps the
// positions 5..d of a shift queue (registers q[4..D-1], q[b] being position b+1): each step
// the message at position k goes out on link dimension k-1 and the queue shifts one place
// toward position 5; a message arriving from the (i+1)-neighbour enters position i; a message
// leaving position 5 (or arriving from the 5-neighbour) starts the sub-hypercube broadcast
// (root_o). Processor 0 loads position d from the I/O controller (io_i). All roots therefore
// start their sub-hypercube broadcast in the same cycle and a new Search can follow every cycle.
// This forward queue follows the published design. The reverse queue rr[4..D-1] is this
// design's mirror image of it: the sub-hypercube answer enters rr[4]; each step the answer
// is sent back along the same dimension it came in on and merged (OR of v) at the receiver,
// bit 4 first and bit D-1 last, so processor 0 holds the whole answer in rr[D-1] (result_o).
// Timing: io_i to root_o takes D-4 register stages; root_rv_i to result_o takes D-4 stages
// (for D = 4 both are straight connections).
module bnet_queue
  import dict_pkg::*;
#(
  parameter int D  = 7,
  parameter int ID = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  smsg_t io_i,              // new Search from the I/O controller (processor 0 only)
  input  smsg_t fwd_i  [D],        // G1 message received on each link dimension
  output smsg_t fwd_o  [D],        // G1 message sent on each link dimension
  output smsg_t root_o,            // message that starts this sub-hypercube's broadcast
  input  rmsg_t root_rv_i,         // this sub-hypercube's answer (from its root node)
  input  rmsg_t rev_i  [D],        // G2 answers received on each link dimension
  output rmsg_t rev_o  [D],        // G2 answer sent on each link dimension
  output rmsg_t result_o           // processor 0: the complete answer
);

  localparam bit IS_IO = (ID == 0);

  // Dimension on which this root sends answers back: its lowest set bit among 4..D-1.
  function automatic int parent_dim();
    for (int b = SUB_BITS; b < D; b++)
      if (((ID >> b) & 1) != 0) return b;
    return -1;
  endfunction
  localparam int PDIM = parent_dim();

  if (D == SUB_BITS) begin : g_single
    // One sub-hypercube: no global queue.
    for (genvar b = 0; b < D; b++) begin : g_links
      assign fwd_o[b] = '0;
      assign rev_o[b] = '0;
    end
    assign root_o   = IS_IO ? io_i : '0;
    assign result_o = root_rv_i;
  end else begin : g_queue
    smsg_t q  [SUB_BITS:D-1];
    rmsg_t rr [SUB_BITS:D-1];
    rmsg_t acc[SUB_BITS:D-1];   // answer that is sent / kept at step b

    for (genvar b = 0; b < D; b++) begin : g_links
      if (b >= SUB_BITS) begin : g_glob
        assign fwd_o[b] = q[b];
        assign rev_o[b] = (b == PDIM) ? acc[b] : '0;
      end else begin : g_loc
        assign fwd_o[b] = '0;
        assign rev_o[b] = '0;
      end
    end

    assign root_o = smsg_merge(q[SUB_BITS], fwd_i[SUB_BITS]);

    for (genvar b = SUB_BITS; b < D; b++) begin : g_stage
      if (b == SUB_BITS) begin : g_first
        assign acc[b] = root_rv_i;
      end else begin : g_next
        assign acc[b] = rr[b-1];
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          q[b]  <= '0;
          rr[b] <= '0;
        end else begin
          if (b == D - 1) q[b] <= IS_IO ? io_i : '0;
          else            q[b] <= smsg_merge(q[b+1], fwd_i[b+1]);
          rr[b] <= rmsg_merge(acc[b], rev_i[b]);
        end
      end
    end

    assign result_o = rr[D-1];
  end

endmodule
