// rr_arbiter: round-robin arbiter over N requesters.
//
// When en is high and any req bit is set, gnt_valid rises and gnt names the
// first requester after the one granted last (combinational). The priority
// pointer moves past the granted requester at the clock edge when en is high.
// Helper of the L2 controller, which serves one core's access at a time.
module rr_arbiter #(
  parameter int unsigned N = 8,
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [N-1:0] req,
  output logic         gnt_valid,
  output logic [W-1:0] gnt
);

  logic [W-1:0] last_q;

  always_comb begin
    gnt_valid = 1'b0;
    gnt       = '0;
    for (int k = N; k >= 1; k--) begin
      logic [W-1:0] c;
      c = W'((int'(last_q) + k) % N);
      if (req[c]) begin
        gnt_valid = en;
        gnt       = W'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= W'(N - 1);
    else if (gnt_valid) last_q <= gnt;
  end

endmodule
