// Word multiplexer (commutator).
//
// One switch per bit of each word; the switch set of word i is opened while
// the decoded divider state sel equals i, which puts the words on the output
// one after the other in the order of the frame. Built as a tree of 2:1
// switch levels, one level per select bit, the structure the original design
// recommends for many channels. Combinational. The number of words and their
// order are this design's choice.
module multiplexer #(
  parameter int unsigned N_WORDS = cu_pkg::N_SLOTS,
  parameter int unsigned W       = cu_pkg::WORD_BITS,
  localparam int unsigned SW     = $clog2(N_WORDS)
) (
  input  logic [N_WORDS-1:0][W-1:0] words,
  input  logic [SW-1:0]             sel,
  output logic [W-1:0]              y
);
  localparam int unsigned LEAVES = 1 << SW;

  // node[l] holds the LEAVES >> l words that survive level l
  logic [SW:0][LEAVES-1:0][W-1:0] node;

  for (genvar i = 0; i < LEAVES; i++) begin : g_leaf
    if (i < N_WORDS) begin : g_word
      assign node[0][i] = words[i];
    end else begin : g_pad
      assign node[0][i] = '0;
    end
  end

  for (genvar l = 0; l < SW; l++) begin : g_level
    for (genvar i = 0; i < LEAVES; i++) begin : g_sw
      if (i < (LEAVES >> (l + 1))) begin : g_used
        assign node[l+1][i] = sel[l] ? node[l][2*i+1] : node[l][2*i];
      end else begin : g_unused
        assign node[l+1][i] = '0;
      end
    end
  end

  assign y = node[SW][0];
endmodule
