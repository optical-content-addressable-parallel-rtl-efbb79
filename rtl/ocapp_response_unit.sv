// ocapp_response_unit: multiple-response resolver with priority register P.
//
// When several words respond (R has several ones), the priority circuit passes
// only the first responder, the lowest-numbered word i with R_i = 1, into P.
// The circuit is a prefix-OR tree of ceil(log2 N_WORDS) stages: stage s ORs each
// position with the position 2^s below it, so after the last stage before[i]
// says whether any lower-numbered word responded, and P_i = R_i & ~before[i].
// The source specifies a priority circuit with a number of stages that grows
// with log2(n) and only passing the first responder; the prefix-OR structure is
// this design's choice.
//
// Interface: pri = 1 loads P from the resolved r at the rising clock edge;
// any_resp is the combinational OR of r. P resets to zero.
module ocapp_response_unit
  import ocapp_pkg::*;
#(
  parameter int unsigned N_WORDS = N_WORDS_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pri,
  input  logic [N_WORDS-1:0] r,
  output logic [N_WORDS-1:0] p,
  output logic               any_resp
);

  localparam int unsigned STAGES = (N_WORDS > 1) ? $clog2(N_WORDS) : 1;

  // pre[s][i]: OR of r over words i-2^s .. i-1 (clipped at 0)
  logic [STAGES:0][N_WORDS-1:0] pre;
  logic [N_WORDS-1:0]           first;

  assign pre[0] = {r[N_WORDS-2:0], 1'b0};

  for (genvar s = 0; s < int'(STAGES); s++) begin : g_stage
    localparam int unsigned D = 1 << s;
    for (genvar i = 0; i < int'(N_WORDS); i++) begin : g_pos
      if (i >= int'(D)) begin : g_or
        assign pre[s+1][i] = pre[s][i] | pre[s][i-D];
      end else begin : g_pass
        assign pre[s+1][i] = pre[s][i];
      end
    end
  end

  assign first    = r & ~pre[STAGES];
  assign any_resp = |r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   p <= '0;
    else if (pri) p <= first;
  end

  a_p_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(p));

endmodule
