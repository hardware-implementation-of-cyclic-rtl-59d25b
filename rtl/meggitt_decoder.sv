// meggitt_decoder: single-error-correcting cyclic decoder after Meggitt.
//
// Three parts work in two passes over the word.
//  1. Syndrome pass: the received word is shifted highest-order first
//     through the syndrome calculator (division by g(x)) while a counter
//     counts the shifts. When the count reaches N (binary 0111 for the (7,3)
//     code) the load pulse copies the syndrome into the self-running
//     syndrome register.
//  2. Correction pass: the buffer register, holding the received word,
//     shifts it out highest-order first while the self-running register
//     steps once per bit (multiplication by x mod g(x)). The error-pattern
//     detector fires when that register shows the syndrome of an error in
//     the highest-order bit, which for a single error in bit j happens
//     exactly when bit j is at the buffer output; that bit is then inverted.
//
// Interface: a one-cycle pulse on we captures din (din[N-1] = r_(N-1)) in the
// input and buffer registers and starts decoding; a new pulse restarts it.
// The corrected bits appear highest-order first on dout_ser, one per cycle
// with dout_ser_valid high, from cycle N+2 to 2N+1 after the we edge. They
// are also gathered into dout; result goes high 2N+2 cycles after the we
// edge (16 for the (7,3) code) and dout and result hold until the next we.
// syndrome shows the first syndrome register.
//
// The two LFSRs, the count-to-N load, the detector and the output XOR follow
// the design description. Loading the buffer at we (so that din need not be
// held), registering the serial output, gathering it into dout, the
// handshake and the synchronous active-high reset are this implementation's
// choices.
module meggitt_decoder #(
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
  output logic             dout_ser,
  output logic             dout_ser_valid,
  output logic [N-K-1:0]   syndrome
);

  localparam int unsigned R  = N - K;
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic [2:0] {ST_IDLE, ST_SYN, ST_LOAD, ST_CORR, ST_FLUSH} state_t;

  state_t        state;
  logic [CW-1:0] cnt;
  logic          r_bit;
  logic          buf_bit;
  logic          load;
  logic          err_here;
  logic          c;

  // Load the self-running register once N bits have been shifted in.
  assign load = (state == ST_LOAD) && (cnt == CW'(N));

  piso_shift_reg #(.W(N)) u_in (
    .clk  (clk),
    .rst  (rst),
    .load (we),
    .shift(state == ST_SYN),
    .d    (din),
    .q    (r_bit)
  );

  syndrome_calc #(.R(R), .G(G)) u_syn (
    .clk(clk),
    .rst(rst),
    .clr(we),
    .en (state == ST_SYN),
    .din(r_bit),
    .syn(syndrome)
  );

  spontaneous_calc #(.N(N), .R(R), .G(G)) u_run (
    .clk     (clk),
    .rst     (rst),
    .load    (load),
    .shift   (state == ST_CORR),
    .syn_in  (syndrome),
    .s       (),
    .err_here(err_here)
  );

  // Buffer register: the received word, shifted out during the correction pass.
  piso_shift_reg #(.W(N)) u_buf (
    .clk  (clk),
    .rst  (rst),
    .load (we),
    .shift(state == ST_CORR),
    .d    (din),
    .q    (buf_bit)
  );

  assign c = buf_bit ^ (err_here && state == ST_CORR);

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= ST_IDLE;
      cnt            <= '0;
      result         <= 1'b0;
      dout           <= '0;
      dout_ser       <= 1'b0;
      dout_ser_valid <= 1'b0;
    end else if (we) begin
      state          <= ST_SYN;
      cnt            <= '0;
      result         <= 1'b0;
      dout_ser_valid <= 1'b0;
    end else begin
      dout_ser_valid <= (state == ST_CORR);
      if (state == ST_CORR) dout_ser <= c;
      if (dout_ser_valid)   dout     <= {dout[N-2:0], dout_ser};
      unique case (state)
        ST_SYN: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(N - 1)) state <= ST_LOAD;
        end
        ST_LOAD: begin
          cnt   <= '0;
          state <= ST_CORR;
        end
        ST_CORR: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(N - 1)) state <= ST_FLUSH;
        end
        ST_FLUSH: begin
          result <= 1'b1;
          state  <= ST_IDLE;
        end
        default: ;
      endcase
    end
  end

  a_load_once : assert property (@(posedge clk) disable iff (rst)
                                 state == ST_LOAD |-> load)
    else $error("Meggitt decoder reached the load step before N shifts");

endmodule
