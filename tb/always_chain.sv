// Chain of N "always" checkers for the scaling testbench: checker k of the
// chain (k = 1 nearest to esco) watches bit k of test_vec.
module always_chain #(
  parameter int N = 8
) (
  input  logic         reset_n,
  input  logic         clk,
  input  logic [N:1]   test_vec,
  input  logic         esclck,
  input  logic         escen_n,
  output logic         eo,
  output logic         esco
);
  logic [N+1:1] e, s;  // e[k] / s[k]: eo / esco entering checker k
  assign e[N+1] = 1'b0;
  assign s[N+1] = 1'b0;
  for (genvar k = 1; k <= N; k++) begin : g_chk
    assert_always u_chk (
      .reset_n, .clk, .test_expr(test_vec[k]),
      .ei(e[k+1]), .esci(s[k+1]), .esclck, .escen_n, .eo(e[k]), .esco(s[k])
    );
  end
  assign eo   = e[1];
  assign esco = s[1];
endmodule
