// mod13_counter -- 4-bit synchronous counter 0,1,...,12,0,... on the falling
// clock edge.
//
// Built as a toggle chain: bit 0 toggles every edge, bit 1 when Q0=1, bit 2
// when Q0&Q1, bit 3 when Q0&Q1&Q2 (the J=K inputs of a JK counter). When the
// toggled value would be 1101 the counter goes to 0000 instead. A discrete
// version clears asynchronously on reaching 1101; folding the clear into the
// next-state logic gives the same count sequence without the short-lived
// 1101 state. rst_n clears the count asynchronously.
// The count addresses the five wash-time membership ROMs and is the weight i
// of the centre-of-gravity sums.
module mod13_counter (
  input  logic       clk,
  input  logic       rst_n,
  output logic [3:0] count
);
  logic [3:0] t;     // toggle enables (J = K)
  logic [3:0] nxt;

  assign t   = {&count[2:0], &count[1:0], count[0], 1'b1};
  assign nxt = count ^ t;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)              count <= '0;
    else if (nxt == 4'd13)   count <= '0;
    else                     count <= nxt;
  end
endmodule
