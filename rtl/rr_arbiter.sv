// rr_arbiter: N-way round-robin arbiter.
//
// Grants the first requester at or after the rotating priority pointer. When
// `advance` is high and a grant is made, the pointer moves to the requester
// after the winner, so every requester is served within N grants.
// Timing: grant is combinational; the pointer updates at the clock edge.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic                 gnt_valid,
  output logic [$clog2(N)-1:0] gnt_idx
);
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1;
  logic [W-1:0] ptr;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int k = 0; k < N; k++) begin
      logic [W-1:0] i;
      i = W'((int'(ptr) + k) % N);
      if (!gnt_valid && req[i]) begin
        gnt_valid = 1'b1;
        gnt_idx   = i;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      ptr <= '0;
    else if (advance && gnt_valid)   ptr <= (gnt_idx == W'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end
endmodule
