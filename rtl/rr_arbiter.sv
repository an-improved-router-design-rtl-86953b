// rr_arbiter: N:1 round-robin arbiter, the basic element of the VC and switch
// allocators.
//
// Among the asserted bits of 'req' it grants the first one at or after the priority
// pointer, scanning upward and wrapping. The grant is combinational (one-hot 'gnt',
// its index 'gnt_idx', and 'gnt_any'). When 'advance' is high on a clock edge while
// a grant is given, the pointer moves to the position just past the granted
// requester, so every requester is served within N grants. Round-robin order is
// this design's choice; the router description only asks for N:1 arbiters.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 gnt_any
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] ptr;

  always_comb begin
    int unsigned idx;
    idx     = 0;
    gnt     = '0;
    gnt_idx = '0;
    gnt_any = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (int'(ptr) + k) % N;
      if (!gnt_any && req[idx]) begin
        gnt_any      = 1'b1;
        gnt[idx]     = 1'b1;
        gnt_idx      = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (advance && gnt_any) begin
      ptr <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;
    end
  end

endmodule
