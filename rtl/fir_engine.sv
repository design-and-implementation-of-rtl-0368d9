// fir_engine: one multiplier stage of the band processor. A single
// serial-parallel multiplier is shared by NSLOT linear-phase FIR filters
// ("slots"), each with its own sample ring buffer, coefficient table and
// sample-rate change.
//
// How it works. Every slot has an input FIFO. A round-robin scheduler picks
// a slot whose job can run: a new input sample is waiting, or an
// interpolating slot still owes zero-valued samples. It writes the sample
// (or the inserted zero) into the slot's ring buffer. A decimating slot
// (DOWN > 1) then computes an output only for every DOWN-th input, starting
// with the first; the other inputs are only stored. An interpolating slot
// (UP > 1) computes an output for the real sample and for each of the UP-1
// zeros that follow it, and multiplies its outputs by UP to restore the
// signal energy. Because the impulse responses are symmetric, h(l) =
// h(LEN-1-l), the two samples that share a coefficient are added first and
// only ceil(LEN/2) multiplications are made per output; the coefficient
// table holds only that half (h(0) .. h(ceil(LEN/2)-1)). The sum of products
// is kept exact in an ACC_W bit accumulator, rounded by 2^-15 (Q1.15
// coefficients), multiplied by UP and saturated to 16 bits.
// The document gives the sharing of one multiplier by several filters, the
// decimation by dropping samples, the interpolation by zero insertion with
// the gain of UP, and the symmetric pre-addition. The scheduler, the FIFOs,
// the memory layout and the number formats are this design's choices.
//
// Timing: a job that stores without computing takes one clock; a computing
// job takes one clock to store, (SAMPLE_W+2) clocks per coefficient and one
// clock to output. After reset the sample memory is cleared, one word per
// clock, before the first job (init_done rises then).
//
// Interface: per slot, in_valid/in_ready/in_data (FIFO input) and
// out_valid/out_ready. A slot is only started when its out_ready is high, and
// its result appears as a one-clock out_valid pulse with the value on the
// shared out_data bus; the consumer must keep the space it advertised (only
// this slot writes it). Coefficients are written through cw_en/cw_addr/
// cw_data; slot s uses addresses CBASE(s) .. CBASE(s)+ceil(LEN[s]/2)-1,
// where CBASE(s) is the sum of ceil(LEN/2) over the slots before s.
module fir_engine
  import lpeq_pkg::*;
#(
  parameter int unsigned NSLOT      = 4,
  // per-slot settings; entries from NSLOT to MAX_SLOT-1 are not used
  parameter slot_arr_t   LEN        = '{15, 15, 31, 31, 0, 0, 0, 0},
  parameter slot_arr_t   DOWN       = '{2, 2, 2, 2, 1, 1, 1, 1},
  parameter slot_arr_t   UP         = '{1, 1, 1, 1, 1, 1, 1, 1},
  parameter int unsigned FIFO_DEPTH = 4,
  parameter int unsigned CAW        = 10   // coefficient address width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid  [NSLOT],
  output logic            in_ready  [NSLOT],
  input  sample_t         in_data   [NSLOT],
  output logic            out_valid [NSLOT],
  input  logic            out_ready [NSLOT],
  output sample_t         out_data,
  input  logic            cw_en,
  input  logic [CAW-1:0]  cw_addr,
  input  coef_t           cw_data,
  output logic            init_done,
  output logic            busy
);

  function automatic slot_arr_t prefix(input slot_arr_t v, input bit half);
    slot_arr_t r;
    int unsigned s = 0;
    for (int i = 0; i < int'(NSLOT); i++) begin
      r[i] = s;
      s += half ? (v[i] + 1) / 2 : v[i];
    end
    return r;
  endfunction

  function automatic int unsigned total(input slot_arr_t v, input bit half);
    int unsigned s = 0;
    for (int i = 0; i < int'(NSLOT); i++) s += half ? (v[i] + 1) / 2 : v[i];
    return s;
  endfunction

  function automatic int unsigned maxof(input slot_arr_t v);
    int unsigned m = 1;
    for (int i = 0; i < int'(NSLOT); i++) if (v[i] > m) m = v[i];
    return m;
  endfunction

  localparam slot_arr_t       SBASE  = prefix(LEN, 1'b0);
  localparam slot_arr_t       CBASE  = prefix(LEN, 1'b1);
  localparam int unsigned S_TOT  = total(LEN, 1'b0);
  localparam int unsigned C_TOT  = total(LEN, 1'b1);
  localparam int unsigned SAW    = $clog2(S_TOT + 1);
  localparam int unsigned PW     = $clog2(maxof(LEN) + 1);
  localparam int unsigned RW     = $clog2(maxof(DOWN) + maxof(UP) + 1);
  localparam int unsigned SW     = (NSLOT > 1) ? $clog2(NSLOT) : 1;
  localparam int unsigned XW     = SAMPLE_W + 1;          // pre-added sample

  // ---------------------------------------------------------------- memories
  sample_t smem [S_TOT];      // sample ring buffers, slot after slot
  coef_t   cmem [C_TOT];      // half coefficient tables, slot after slot

  always_ff @(posedge clk) begin
    if (cw_en && cw_addr < CAW'(C_TOT)) cmem[cw_addr] <= cw_data;
  end

  // ------------------------------------------------------------ input FIFOs
  logic    f_valid [NSLOT];
  logic    f_pop   [NSLOT];
  sample_t f_data  [NSLOT];

  for (genvar g = 0; g < NSLOT; g++) begin : g_fifo
    logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;
    sample_fifo #(.W(SAMPLE_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid (in_valid[g]), .in_ready (in_ready[g]), .in_data (in_data[g]),
      .out_valid(f_valid[g]),  .out_ready(f_pop[g]),    .out_data(f_data[g]),
      .count    (f_count)
    );
  end

  // --------------------------------------------------------------- state
  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_WAIT} state_t;
  state_t state;

  logic [PW-1:0]  wp  [NSLOT];   // next write position in each ring
  logic [RW-1:0]  ph  [NSLOT];   // decimation phase
  logic [RW-1:0]  ip  [NSLOT];   // interpolation phase (0: expects a real sample)
  logic [SW-1:0]  rr;            // round-robin start
  logic [SAW-1:0] clr;           // clear address

  logic [SW-1:0]  cur;           // slot being computed
  logic [$clog2(MAX_SLOT)-1:0] cx;   // cur widened to index the settings arrays
  assign cx = $bits(cx)'(cur);
  logic [PW-1:0]  pa, pb;        // newest-going-back / oldest-going-forward
  logic [PW-1:0]  tap;           // next coefficient to issue
  acc_t           acc;

  // ---------------------------------------------------------- scheduling
  logic          pick;
  logic [SW-1:0] psel;
  logic [$clog2(MAX_SLOT)-1:0] px;   // psel widened to index the settings arrays
  assign px = $bits(px)'(psel);
  logic          pzero;     // inserted zero of an interpolating slot
  logic          pcomp;     // job computes an output

  always_comb begin
    pick  = 1'b0;
    psel  = '0;
    pzero = 1'b0;
    pcomp = 1'b0;
    if (state == S_IDLE) begin
      for (int k = 0; k < int'(NSLOT); k++) begin
        automatic int unsigned s = (int'(rr) + k) % NSLOT;
        automatic logic zero = (ip[s] != 0);
        automatic logic comp = zero || (ph[s] == 0);
        // out_valid[s] high: the last result is being written this clock and
        // is not yet counted in the consumer's room
        if (!pick && (zero || f_valid[s]) && (!comp || (out_ready[s] && !out_valid[s]))) begin
          pick  = 1'b1;
          psel  = SW'(s);
          pzero = zero;
          pcomp = comp;
        end
      end
    end
  end

  always_comb begin
    for (int s = 0; s < int'(NSLOT); s++) f_pop[s] = pick && !pzero && (psel == SW'(s));
  end

  // ------------------------------------------------------ multiply-accumulate
  localparam int unsigned MW = COEF_W + XW;
  logic                   m_start, m_busy, m_done;
  logic signed [XW-1:0]   m_x;
  coef_t                  m_a;
  logic signed [MW-1:0]   m_p;

  sp_multiplier #(.AW(COEF_W), .XW(XW)) u_mult (
    .clk, .rst_n, .start(m_start), .a(m_a), .x(m_x),
    .busy(m_busy), .done(m_done), .p(m_p)
  );

  logic [PW-1:0] len_c, half_c;
  assign len_c  = PW'(LEN[cx]);
  assign half_c = PW'((LEN[cx] + 1) / 2);

  // operands of the tap at (pa, pb, tap)
  always_comb begin
    automatic sample_t sa = smem[SAW'(SBASE[cx]) + SAW'(pa)];
    automatic sample_t sb = smem[SAW'(SBASE[cx]) + SAW'(pb)];
    m_x = (pa == pb) ? XW'(sa) : XW'(sa) + XW'(sb);
    m_a = cmem[CAW'(CBASE[cx]) + CAW'(tap)];
  end

  logic issue_first;   // first tap, issued in the clock after the store
  logic last_done;
  acc_t acc_next;
  assign last_done = (state == S_WAIT) && m_done && (tap == half_c);
  assign acc_next  = acc + acc_t'(m_p);
  assign m_start   = issue_first || ((state == S_WAIT) && m_done && (tap != half_c));

  function automatic logic [PW-1:0] dec(input logic [PW-1:0] v, input logic [PW-1:0] l);
    return (v == '0) ? l - 1'b1 : v - 1'b1;
  endfunction
  function automatic logic [PW-1:0] incw(input logic [PW-1:0] v, input logic [PW-1:0] l);
    return (v == l - 1'b1) ? '0 : v + 1'b1;
  endfunction

  // ----------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_CLEAR;
      clr         <= '0;
      rr          <= '0;
      cur         <= '0;
      pa          <= '0;
      pb          <= '0;
      tap         <= '0;
      acc         <= '0;
      issue_first <= 1'b0;
      init_done   <= 1'b0;
      out_data    <= '0;
      for (int s = 0; s < int'(NSLOT); s++) begin
        wp[s]        <= '0;
        ph[s]        <= '0;
        ip[s]        <= '0;
        out_valid[s] <= 1'b0;
      end
    end else begin
      issue_first <= 1'b0;
      for (int s = 0; s < int'(NSLOT); s++) out_valid[s] <= 1'b0;
      unique case (state)
        S_CLEAR: begin
          if (clr == SAW'(S_TOT - 1)) begin
            state     <= S_IDLE;
            init_done <= 1'b1;
          end
          clr <= clr + 1'b1;
        end
        S_IDLE: begin
          if (pick) begin
            automatic logic [PW-1:0] l = PW'(LEN[px]);
            rr     <= (psel == SW'(NSLOT - 1)) ? '0 : psel + 1'b1;
            wp[psel] <= incw(wp[psel], l);
            if (pzero)
              ip[psel] <= (ip[psel] == RW'(UP[px] - 1)) ? '0 : ip[psel] + 1'b1;
            else begin
              if (UP[px] > 1) ip[psel] <= RW'(1);
              ph[psel] <= (ph[psel] == RW'(DOWN[px] - 1)) ? '0 : ph[psel] + 1'b1;
            end
            if (pcomp) begin
              cur         <= psel;
              pa          <= wp[psel];              // newest sample
              pb          <= incw(wp[psel], l);     // oldest sample
              tap         <= '0;
              acc         <= '0;
              issue_first <= 1'b1;
              state       <= S_WAIT;
            end
          end
        end
        S_WAIT: begin
          if (m_done) acc <= acc_next;
          if (last_done) begin
            out_data       <= sat(round_shift(acc_next, COEF_FRAC) * acc_t'(UP[cx]));
            out_valid[cur] <= 1'b1;
            state          <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
      if (m_start) begin
        pa  <= dec(pa, len_c);
        pb  <= incw(pb, len_c);
        tap <= tap + 1'b1;
      end
    end
  end

  // sample memory: cleared after reset, then written by store jobs
  always_ff @(posedge clk) begin
    if (state == S_CLEAR)
      smem[clr] <= '0;
    else if (pick)
      smem[SAW'(SBASE[px]) + SAW'(wp[psel])] <= pzero ? '0 : f_data[psel];
  end

  assign busy = (state != S_IDLE) || pick;

  // A result may only be produced for a consumer that had room when the job
  // started; nobody else writes that consumer, so the room must still be there.
  for (genvar g = 0; g < NSLOT; g++) begin : g_chk
    a_room : assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[g] |-> out_ready[g]);
  end

endmodule
