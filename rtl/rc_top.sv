// Reservoir computer on stochastic bitstreams: input encoder, 25-neuron
// small-world reservoir, LUT-RAM readout and winner-take-all.
//
// The network runs in discrete timesteps of one window, 2^WIN_LOG2 clock
// cycles (2^16 by default, as published). At the start of window t the input
// sample u(t) is loaded into an encoder LUT-RAM, which emits it as a bipolar
// bitstream, and each neuron's state x(t-1), counted over the previous window,
// is loaded into that neuron's own encoder. During the window every neuron
// combines u(t) and its neighbours' x(t-1) streams through LUT-RAM synapses, a
// random-multiplexer sum and a counter non-linearity; its output bitstream is
// counted into x(t), and is also weighted by the readout synapses, whose
// summed stream is counted into y(t). So x(t) = f(W x(t-1) + Win u(t)) and
// y(t) = Wout x(t) / N, all in bipolar coding (count / 2^WIN_LOG2 = (v+1)/2).
// The first window after idle starts from x = 0 (code 16'h8000).
//
// Which parts follow the published design: LUT-RAM synapses and encoders with
// their address probabilities, 25 neurons, small-world wiring, readout with
// LUT-RAM multipliers and winner-take-all, 2^16-bit windows. This design's own
// choices: the per-window delayed recurrence, the multiplexer sum, the
// counter non-linearity, the exact graph, the configuration port and the
// handshake.
//
// Interface:
//   cfg_we/cfg_addr/cfg_weight : write one synapse weight (8-bit probability
//     code, bipolar value = 2*code/256 - 1 approximately). Reservoir synapse s
//     of neuron n is at n*(K_REC+1)+s (s = 0 is the input); readout weight of
//     neuron n for output o is at N*(K_REC+1) + o*N + n. Write while idle.
//   run  : keep starting windows. u_in is sampled on cycles where u_take = 1.
//   step_valid : one-cycle pulse after each window; state, y and winner then
//     hold the results of that window until the next pulse. state[n] is the
//     neuron's ones count scaled to a 16-bit probability code; y[o] is the raw
//     ones count of readout output o (0 .. 2^WIN_LOG2).
module rc_top #(
  parameter int unsigned N          = 25,
  parameter int unsigned K_REC      = 4,
  parameter int unsigned NOUT       = 2,
  parameter int unsigned WIN_LOG2   = 16,
  parameter int unsigned FSM_STATES = 16,
  localparam int unsigned M         = K_REC + 1,
  localparam int unsigned NRES      = N * M,
  localparam int unsigned NRO       = N * NOUT,
  localparam int unsigned AW        = $clog2(NRES + NRO),
  localparam int unsigned CW        = WIN_LOG2 + 1,
  localparam int unsigned XW        = (NOUT > 1) ? $clog2(NOUT) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   cfg_we,
  input  logic [AW-1:0]          cfg_addr,
  input  logic [7:0]             cfg_weight,
  input  logic                   run,
  input  logic [15:0]            u_in,
  output logic                   u_take,
  output logic                   step_valid,
  output logic [N-1:0][15:0]     state,
  output logic [NOUT-1:0][CW-1:0] y,
  output logic [XW-1:0]          winner
);
  localparam int unsigned RIW = $clog2(NRES);
  localparam int unsigned OIW = (NRO > 1) ? $clog2(NRO) : 1;

  // ---------------------------------------------------------------- control
  logic active, last, load, first;

  window_ctrl #(.WIN_LOG2(WIN_LOG2)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .run(run),
    .active(active), .last(last), .load(load), .first(first)
  );

  assign u_take = load;

  // ----------------------------------------------------------- input encoder
  logic [3:0] a_in;
  logic       u_bit;

  addr_gen #(.NLINES(4), .SEED(500)) u_ain (.clk(clk), .rst_n(rst_n), .a(a_in));

  bs_gen u_uenc (
    .clk(clk), .rst_n(rst_n), .load(load), .p(u_in), .a(a_in), .o_bit(u_bit)
  );

  // ----------------------------------------------------------------- reservoir
  logic [N-1:0]         x_bits, fb_bits;
  logic [N-1:0][CW-1:0] x_total, x_count;

  reservoir #(.N(N), .K_REC(K_REC), .STATES(FSM_STATES)) u_res (
    .clk(clk), .rst_n(rst_n),
    .w_we(cfg_we && (cfg_addr < AW'(NRES))), .w_idx(RIW'(cfg_addr)), .w_data(cfg_weight),
    .u_bit(u_bit), .fb_bits(fb_bits), .x_bits(x_bits)
  );

  // Window count -> 16-bit probability code: scaled to 2^16 and saturated
  // (a full window of ones, 2^WIN_LOG2, becomes 16'hFFFF).
  function automatic logic [15:0] to_code(input logic [CW-1:0] v);
    logic [47:0] w;
    w = (WIN_LOG2 <= 16) ? (48'(v) << (16 - WIN_LOG2)) : (48'(v) >> (WIN_LOG2 - 16));
    return (w > 48'hFFFF) ? 16'hFFFF : w[15:0];
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_state
    logic [3:0]  a_fb;
    logic [15:0] fb_val;

    bs_counter #(.WIN_LOG2(WIN_LOG2)) u_cnt (
      .clk(clk), .rst_n(rst_n), .en(active), .last(last), .in_bit(x_bits[n]),
      .total(x_total[n]), .count(x_count[n])
    );

    // Delayed recurrence: this window's total becomes next window's stream.
    addr_gen #(.NLINES(4), .SEED(600 + n)) u_afb (.clk(clk), .rst_n(rst_n), .a(a_fb));

    assign fb_val = first ? 16'h8000 : to_code(x_total[n]);

    bs_gen u_fbenc (
      .clk(clk), .rst_n(rst_n), .load(load), .p(fb_val), .a(a_fb), .o_bit(fb_bits[n])
    );

    assign state[n] = to_code(x_count[n]);
  end

  // ------------------------------------------------------------------- readout
  logic [NOUT-1:0] y_bits;

  readout #(.N(N), .NOUT(NOUT)) u_ro (
    .clk(clk), .rst_n(rst_n),
    .w_we(cfg_we && (cfg_addr >= AW'(NRES))), .w_idx(OIW'(cfg_addr - AW'(NRES))),
    .w_data(cfg_weight), .x_bits(x_bits), .y_bits(y_bits)
  );

  for (genvar o = 0; o < NOUT; o++) begin : g_y
    bs_counter #(.WIN_LOG2(WIN_LOG2)) u_cnt (
      .clk(clk), .rst_n(rst_n), .en(active), .last(last), .in_bit(y_bits[o]),
      .total(), .count(y[o])
    );
  end

  wta #(.NOUT(NOUT), .W(CW)) u_wta (.vals(y), .winner(winner));

  always_ff @(posedge clk) begin
    if (!rst_n) step_valid <= 1'b0;
    else        step_valid <= active && last;
  end

  // Weights may only change between windows.
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> !active);
endmodule
