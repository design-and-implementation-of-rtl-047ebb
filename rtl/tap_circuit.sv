// tap_circuit: one complex tap of the emulated channel.
//
// Signal path: the input multiplexer picks one of the three base-band inputs,
// the delay FIFO delays it by the tap's programmed delay, the complex
// multiplier weights it with the tap coefficient E_i(t), and the adder puts
// the product on one of the two partial-sum buses that run through all taps
// towards the two outputs.  The bus not chosen passes through a register of
// the same latency as the adder, so both buses stay aligned.  This is the
// tap of the original design; the FIR filters it forms are set only by which
// input and which bus each tap selects.
//
// Coefficient path: two RAM banks (real and imaginary part), each read at the
// scan address and interpolated in real time by coef_interp.
//
// Each tap decodes the DSP write bus for its own addresses (see ce_pkg):
// its two RAM banks, its filter coefficients and its three registers
// (input select 0..2, 3 = no input; output bus 0..1; delay in samples).
// Every register stage of the partial-sum chain adds one sample of latency
// for taps early in the chain; this design compensates it in the tap by
// adding TAP_IDX to the programmed delay, so the delay register holds tau_i
// directly: a sample the input multiplexer takes at ce edge s reaches the end
// of the chain after edge s + tau_i + NTAPS + 2 whatever the tap position
// (input mux, FIFO, multiplier, one register per tap on the chain).
module tap_circuit
  import ce_pkg::*;
#(
  parameter int TAP_IDX = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  input  bus_t              bus,
  input  logic              f2_tick,
  input  logic              f1_tick,
  input  logic [RAM_AW-1:0] scan_addr,
  input  iq_t               x_in    [NIN],
  input  iq_sum_t           sum_in  [NOUT],
  output iq_sum_t           sum_out [NOUT]
);
  logic [5:0]         bank;
  logic               tapsel;
  logic [1:0]         in_sel;
  logic               out_sel;
  logic [FIFO_AW-1:0] delay;
  logic [FIFO_AW-1:0] fifo_delay;
  iq_t                x_sel, x_del, e, prod;
  logic signed [TAPC_W-1:0] q_re, q_im, e_re, e_im;
  coef_wr_t           cw_re, cw_im;
  logic               we_re, we_im;

  // Address decoder
  assign bank   = bus.addr[23:18];
  assign tapsel = (int'(bus.addr[12:8]) == TAP_IDX);
  assign we_re  = bus.we && (int'(bank) == 2 * TAP_IDX);
  assign we_im  = bus.we && (int'(bank) == 2 * TAP_IDX + 1);

  always_comb begin
    cw_re      = '0;
    cw_re.idx  = bus.addr[6:0];
    cw_re.data = bus.wdata[FIR_COEF_W-1:0];
    cw_im      = cw_re;
    cw_re.we   = bus.we && bank == BANK_TAPCOEF && tapsel && !bus.addr[7];
    cw_im.we   = bus.we && bank == BANK_TAPCOEF && tapsel &&  bus.addr[7];
  end

  // Control registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_sel  <= 2'd3;
      out_sel <= 1'b0;
      delay   <= '0;
    end else if (bus.we && bank == BANK_TAPREG && tapsel) begin
      unique case (bus.addr[1:0])
        TREG_INSEL:  in_sel  <= bus.wdata[1:0];
        TREG_OUTSEL: out_sel <= bus.wdata[0];
        TREG_DELAY:  delay   <= bus.wdata[FIFO_AW-1:0];
        default: ;
      endcase
    end
  end

  // Input multiplexer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  x_sel <= '0;
    else if (ce) x_sel <= (in_sel < 2'(NIN)) ? x_in[in_sel] : '0;
  end

  assign fifo_delay = delay + FIFO_AW'(TAP_IDX);

  delay_fifo u_fifo (
    .clk, .rst_n, .ce,
    .din   (x_sel),
    .delay (fifo_delay),
    .dout  (x_del)
  );

  // Coefficient RAMs and interpolators
  coef_ram u_ram_re (
    .clk, .we (we_re), .waddr (bus.addr[RAM_AW-1:0]), .wdata (bus.wdata[TAPC_W-1:0]),
    .raddr (scan_addr), .q (q_re)
  );
  coef_ram u_ram_im (
    .clk, .we (we_im), .waddr (bus.addr[RAM_AW-1:0]), .wdata (bus.wdata[TAPC_W-1:0]),
    .raddr (scan_addr), .q (q_im)
  );
  coef_interp u_int_re (
    .clk, .rst_n, .ce, .f2_tick, .f1_tick, .ram_q (q_re), .cw (cw_re), .e (e_re)
  );
  coef_interp u_int_im (
    .clk, .rst_n, .ce, .f2_tick, .f1_tick, .ram_q (q_im), .cw (cw_im), .e (e_im)
  );
  assign e = '{i: e_re, q: e_im};

  cmult u_mult (.clk, .rst_n, .ce, .x (x_del), .e, .y (prod));

  // Adder on the selected bus, matching delay on the other
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NOUT; b++) sum_out[b] <= '0;
    end else if (ce) begin
      for (int b = 0; b < NOUT; b++) begin
        if (int'(out_sel) == b) begin
          sum_out[b].i <= sum_in[b].i + SUM_W'(prod.i);
          sum_out[b].q <= sum_in[b].q + SUM_W'(prod.q);
        end else begin
          sum_out[b] <= sum_in[b];
        end
      end
    end
  end
endmodule
