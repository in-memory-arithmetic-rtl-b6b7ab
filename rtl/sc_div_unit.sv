// sc_div_unit: binary-in, binary-out stochastic divider.
//
// Wraps the LIM stochastic divider (sc_divider) with what it needs to take
// and return binary numbers: a correlated bit-stream generator pair (sc_sng)
// for the dividend and divisor, and a counter (sc_counter) that turns the
// quotient stream back into a count. The result q_count = M means a
// quotient of M/N with N = 2^LOG_N; for X <= Y it approximates X/Y, for
// X > Y it saturates at N (every Y = 1 bit copies an X bit that is 1), and
// for Y = 0 it is 0 (Q keeps its cleared value).
//
// Sequence: start (sampled while idle) latches x_val/y_val and restarts the
// generator. The N stream bits follow in the next N cycles (state RUN). A
// quotient bit is valid 1.5 cycles after its inputs started, so the divider
// finishes N + 1/2 cycles after the first bit; one more half cycle later the
// counter has taken the last bit (state DRAIN) and done pulses for one
// cycle. done is high N + 2 cycles after the cycle in which start was
// accepted. While idle the LIM gates are held cleared, so every division
// starts with Q = 0. The handshake and result format are this design's own.
module sc_div_unit #(
  parameter int unsigned LOG_N  = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] x_val,
  input  logic [DATA_W-1:0] y_val,
  output logic              busy,
  output logic              done,
  output logic [LOG_N:0]    q_count
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;

  localparam int unsigned N = 1 << LOG_N;

  state_t           state;
  logic [LOG_N-1:0] bit_idx;
  logic [DATA_W-1:0] x_q, y_q;
  logic             accept;
  logic             sng_x, sng_y;
  logic             x_bit, y_bit;
  logic             sample_en;
  logic             q_bit;

  assign accept = (state == S_IDLE) && start;
  assign busy   = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      bit_idx <= '0;
      x_q     <= '0;
      y_q     <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state   <= S_RUN;
          bit_idx <= '0;
          x_q     <= x_val;
          y_q     <= y_val;
        end
        S_RUN: begin
          bit_idx <= bit_idx + 1'b1;
          if (bit_idx == LOG_N'(N - 1)) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  sc_sng #(.LOG_N(LOG_N), .DATA_W(DATA_W)) u_sng (
    .clk(clk), .rst_n(rst_n), .load(accept), .en(state == S_RUN),
    .x_val(x_q), .y_val(y_q), .x_bit(sng_x), .y_bit(sng_y)
  );

  // Streams are only presented while running.
  assign x_bit = sng_x && (state == S_RUN);
  assign y_bit = sng_y && (state == S_RUN);

  sc_divider u_div (
    .clk(clk), .clr(state == S_IDLE), .x(x_bit), .y(y_bit),
    .and1(), .and2(), .q(q_bit)
  );

  // Quotient bit k is sampled one cycle after input bit k was presented.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_en <= 1'b0;
      done      <= 1'b0;
    end else begin
      sample_en <= (state == S_RUN);
      done      <= (state == S_DRAIN);
    end
  end

  sc_counter #(.LOG_N(LOG_N)) u_cnt (
    .clk(clk), .rst_n(rst_n), .clear(accept), .en(sample_en),
    .bit_in(q_bit), .count(q_count)
  );

endmodule
