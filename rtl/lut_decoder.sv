// lut_decoder: single-error-correcting cyclic decoder with a syndrome look-up
// table (the LUT method).
//
// The received word is shifted highest-order first through the syndrome
// calculator (division by g(x)). After N shifts the syndrome addresses a ROM
// that returns the error pattern of the single-bit error with that syndrome
// (zero for a zero syndrome), and the corrected word is the received word
// XOR the error pattern. Unlike the Meggitt decoder, all bits are corrected
// at once, so no second pass over the word is needed.
//
// Interface: a one-cycle pulse on we captures din (din[N-1] = r_(N-1)) and
// starts decoding; a new pulse restarts it. N+1 cycles after the we edge
// (8 for the (7,3) code) result goes high and dout holds the corrected word;
// both hold until the next we. syndrome shows the syndrome register.
//
// Syndrome circuit, ROM contents and the final XOR follow the design
// description. Registering the corrected word (which gives the N+1 cycle
// latency), keeping a copy of din for the XOR, the we/result handshake and
// the synchronous active-high reset are this implementation's choices.
module lut_decoder #(
  parameter int unsigned         N = cyclic_pkg::DEF_N,
  parameter int unsigned         K = cyclic_pkg::DEF_K,
  parameter logic        [N-K:0] G = cyclic_pkg::DEF_G
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [N-1:0]     din,
  output logic             result,
  output logic [N-1:0]     dout,
  output logic [N-K-1:0]   syndrome
);

  localparam int unsigned R  = N - K;
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic [1:0] {ST_IDLE, ST_SHIFT, ST_CORRECT} state_t;

  state_t        state;
  logic [CW-1:0] cnt;
  logic [N-1:0]  rbuf;
  logic          r_bit;
  logic [N-1:0]  err;

  piso_shift_reg #(.W(N)) u_in (
    .clk  (clk),
    .rst  (rst),
    .load (we),
    .shift(state == ST_SHIFT),
    .d    (din),
    .q    (r_bit)
  );

  syndrome_calc #(.R(R), .G(G)) u_syn (
    .clk(clk),
    .rst(rst),
    .clr(we),
    .en (state == ST_SHIFT),
    .din(r_bit),
    .syn(syndrome)
  );

  syndrome_rom #(.N(N), .R(R), .G(G)) u_rom (
    .syn(syndrome),
    .err(err)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= ST_IDLE;
      cnt    <= '0;
      rbuf   <= '0;
      result <= 1'b0;
      dout   <= '0;
    end else if (we) begin
      state  <= ST_SHIFT;
      cnt    <= '0;
      rbuf   <= din;
      result <= 1'b0;
    end else begin
      unique case (state)
        ST_SHIFT: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(N - 1)) state <= ST_CORRECT;
        end
        ST_CORRECT: begin
          dout   <= rbuf ^ err;
          result <= 1'b1;
          state  <= ST_IDLE;
        end
        default: ;
      endcase
    end
  end

  a_cnt_range : assert property (@(posedge clk) disable iff (rst)
                                 state == ST_SHIFT |-> cnt < CW'(N))
    else $error("LUT decoder shift counter out of range");

endmodule
