// cyclic_encoder: systematic (N,K) cyclic encoder.
//
// The codeword is c(x) = x^(N-K) a(x) + (x^(N-K) a(x) mod g(x)): the K message
// bits followed by the N-K remainder bits. The remainder is formed by a
// division circuit of R = N-K stages S(0)..S(R-1) whose feedback is the
// message bit XORed with S(R-1); the feedback enters S(0) and is XORed into
// the input of every other stage i with g_i = 1. The message bits enter
// highest-order first from a parallel-load shift register.
//
// Interface: a one-cycle pulse on we captures din (din[K-1] is a_(K-1), the
// highest-order message bit) and starts an encoding; a new pulse restarts it.
// K clock cycles after the we edge, result goes high and dout holds
// {din, S(R-1)..S(0)}, i.e. dout[N-1] = c_(N-1). result and dout hold until
// the next we. For the default (7,3) code, message 101 encodes to 1011100
// in 3 cycles.
//
// The division circuit, the generator polynomial and the word layout follow
// the design description; the we/result handshake, the synchronous
// active-high reset and the holding of the result are this implementation's
// choices. The output switch of the classic serial encoder is not needed
// because the codeword is delivered in parallel.
module cyclic_encoder #(
  parameter int unsigned                   N = cyclic_pkg::DEF_N,
  parameter int unsigned                   K = cyclic_pkg::DEF_K,
  parameter logic        [N-K:0]           G = cyclic_pkg::DEF_G
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [K-1:0] din,
  output logic         result,
  output logic [N-1:0] dout
);

  localparam int unsigned R  = N - K;
  localparam int unsigned CW = $clog2(K + 1);

  logic          busy;
  logic [CW-1:0] cnt;
  logic [K-1:0]  msg;
  logic [R-1:0]  s;
  logic [R-1:0]  s_nxt;
  logic          a;
  logic          fb;

  piso_shift_reg #(.W(K)) u_in (
    .clk  (clk),
    .rst  (rst),
    .load (we),
    .shift(busy),
    .d    (din),
    .q    (a)
  );

  assign fb = a ^ s[R-1];

  always_comb begin
    s_nxt = {s[R-2:0], 1'b0};
    if (fb) s_nxt = s_nxt ^ G[R-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      cnt    <= '0;
      msg    <= '0;
      s      <= '0;
      result <= 1'b0;
      dout   <= '0;
    end else if (we) begin
      busy   <= 1'b1;
      cnt    <= '0;
      msg    <= din;
      s      <= '0;
      result <= 1'b0;
    end else if (busy) begin
      s   <= s_nxt;
      cnt <= cnt + 1'b1;
      if (cnt == CW'(K - 1)) begin
        busy   <= 1'b0;
        result <= 1'b1;
        dout   <= {msg, s_nxt};
      end
    end
  end

  a_cnt_range : assert property (@(posedge clk) disable iff (rst) busy |-> cnt < CW'(K))
    else $error("encoder shift counter out of range");

endmodule
