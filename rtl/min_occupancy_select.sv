// min_occupancy_select: chooses which merge-tree input buffer to refill.
//
// Each cycle it finds, among the buffers marked eligible (a page of theirs
// is waiting in memory and a page fits), the one with the lowest level, and
// registers the answer: index 'sel' and 'found'. Ties go to the lower index.
// Choosing the minimum is what bounds the buffer sizes of the merge tree
// (see input_buffer). Selection latency is one cycle; the scheduler decides
// at most once per page slice, so the one-cycle-old answer is current.
module min_occupancy_select #(
  parameter int unsigned K  = 64,
  parameter int unsigned LW = 10,
  parameter int unsigned KW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [K-1:0]  eligible,
  input  logic [LW-1:0] level [K],
  output logic          found,
  output logic [KW-1:0] sel
);

  logic          f_c;
  logic [KW-1:0] s_c;
  logic [LW-1:0] best;

  always_comb begin
    f_c  = 1'b0;
    s_c  = '0;
    best = '1;
    for (int i = 0; i < int'(K); i++) begin
      if (eligible[i] && (!f_c || (level[i] < best))) begin
        f_c  = 1'b1;
        s_c  = KW'(i);
        best = level[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      found <= 1'b0;
      sel   <= '0;
    end else begin
      found <= f_c;
      sel   <= s_c;
    end
  end

endmodule
