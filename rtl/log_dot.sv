// log_dot: vector multiplication Z = sum(x_i * y_i) estimated in the log
// domain with low accumulation error.
// Pass 1 (LOAD): each incoming pair is converted by truncation and multiplied
// in the log domain, z_i = x_l + y_l - bias; the z_i go into a buffer and
// their maximum m is tracked. Pass 2 (ACC): every z_i is compared with m,
// ed_i = round(m - z_i), and 2^-ed_i (zero once ed_i exceeds 5) is added to an
// accumulator. Then Z_l = m + acc - 1 (the maximum's own term counted as 1),
// and Z is its recovery to float. Every ed_i is taken against the same
// maximum, so the accumulation does not feed back into later steps.
// Interface: pulse start with len (1..DEPTH); then present len elements with
// in_valid, one per cycle at most; pass 2 takes len cycles; done pulses one
// cycle later with z_l/z_f, which stay valid until the next start. With one
// element per cycle, done rises 2*len+1 clock edges after the edge that takes
// start (len = 0: one edge, Z = 0). busy is high from start to done.
// The estimate is good when one term dominates; since log2(1 + x) ~ x is used
// on the whole sum, it overestimates when many terms lie close to the maximum.
// Elements are taken as magnitudes (signs ignored) as in the source
// algorithm; DEPTH, the handshake and the timing are this design's choices.
module log_dot
  import log_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned LW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] len,
  input  logic          in_valid,
  input  logic [31:0]   x,
  input  logic [31:0]   y,
  output logic          busy,
  output logic          done,
  output logint_t       z_l,
  output logic [31:0]   z_f
);
  localparam int MW   = LOG_MW;
  localparam int ONE  = 1 << LOG_FRAC;
  localparam int BIAS = 127 << LOG_FRAC;
  localparam int MAXV = (254 << LOG_FRAC) + ONE - 1;
  localparam int AW   = MW + LW + 1;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_ACC, S_DONE} state_e;

  state_e           state;
  logic [LW-1:0]    n_len, cnt;
  logic [MW-1:0]    zbuf [DEPTH];
  logic [MW-1:0]    m;
  logic [AW-1:0]    acc;

  // log-domain product of one pair, magnitudes only
  function automatic logic [MW-1:0] lmul(input logic [31:0] fx, input logic [31:0] fy);
    logint_t lx, ly;
    int      r;
    lx = to_log(fx);
    ly = to_log(fy);
    r  = int'(lx.mag) + int'(ly.mag) - BIAS;
    if (r < 0)    r = 0;
    if (r > MAXV) r = MAXV;
    return MW'(r);
  endfunction

  logic [MW-1:0] z_new, z_cur, dz;
  logic [MW:0]   ed_v;
  logic [AW-1:0] term;
  int            zl_i;

  always_comb begin
    z_new = lmul(x, y);
    z_cur = zbuf[cnt[$clog2(DEPTH)-1:0]];
    dz    = m - z_cur;
    ed_v  = ({1'b0, dz} + (MW+1)'(ONE / 2)) >> LOG_FRAC;
    term  = (ed_v <= (MW+1)'(5)) ? AW'(ONE >> ed_v) : '0;
    zl_i  = int'(m) + int'(acc) - ONE;
    if (zl_i < 0)    zl_i = 0;
    if (zl_i > MAXV) zl_i = MAXV;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n_len <= '0;
      cnt   <= '0;
      m     <= '0;
      acc   <= '0;
      done  <= 1'b0;
      z_l   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n_len <= len;
          cnt   <= '0;
          m     <= '0;
          acc   <= '0;
          state <= (len == '0) ? S_DONE : S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          zbuf[cnt[$clog2(DEPTH)-1:0]] <= z_new;
          if (z_new > m) m <= z_new;
          if (cnt == n_len - 1'b1) begin
            cnt   <= '0;
            state <= S_ACC;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_ACC: begin
          acc <= acc + term;
          if (cnt == n_len - 1'b1) state <= S_DONE;
          else                     cnt   <= cnt + 1'b1;
        end
        S_DONE: begin
          done  <= 1'b1;
          z_l   <= (n_len == '0) ? '0 : logint_t'({1'b0, MW'(zl_i)});
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign z_f  = from_log(z_l);

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("log_dot: DEPTH must be a power of two");
  end
  // the requested length must fit the buffer
  a_len_fits: assert property (@(posedge clk)
                               (state == S_IDLE && start) |-> len <= LW'(DEPTH))
    else $error("log_dot: len > DEPTH");
endmodule
