// Sequence controller of the multiply-accumulate FIR filter.
//
// One sampling interval is split into N processing cycles. When sample_strobe marks a
// new sample (the sampling clock Clk_S, brought into the system clock domain as a
// one-clock pulse) the controller steps a counter k = 0 .. N-1 on the system clock:
//   * p_en (the processing clock Clk_P) is high in each processing cycle and mux_sel = k
//     addresses the coefficient ROM and the partial-sum multiplexer;
//   * one clock later r_en with r_idx = k (the register load clock Clk_R(k)) writes the
//     new partial sum into register k.
// Load and processing clocks thus act on alternate edges of the pipeline, which is the
// out-of-phase relation of the two clocks written as clock enables of one clock.
// A sample takes N+1 clocks; busy is high meanwhile and a strobe that arrives while busy
// is ignored. Sequencing N cycles per sample with k stepping in order follows the design
// description; clock enables instead of derived clocks are this design's choice.
module seq_controller #(
  parameter int unsigned N = 513
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample_strobe,
  output logic                 start,     // one-clock pulse: a sample is accepted
  output logic                 p_en,
  output logic [$clog2(N)-1:0] mux_sel,
  output logic                 r_en,
  output logic [$clog2(N)-1:0] r_idx,
  output logic                 busy
);

  localparam int unsigned KW = $clog2(N);

  logic running;

  assign start = sample_strobe & ~busy;
  assign p_en  = running;
  assign busy  = running | r_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      mux_sel <= '0;
      r_en    <= 1'b0;
      r_idx   <= '0;
    end else begin
      r_en  <= running;
      r_idx <= mux_sel;
      if (start) begin
        running <= 1'b1;
        mux_sel <= '0;
      end else if (running) begin
        if (mux_sel == KW'(N - 1)) begin
          running <= 1'b0;
          mux_sel <= '0;
        end else begin
          mux_sel <= mux_sel + KW'(1);
        end
      end
    end
  end

  // A new sample must not arrive while the previous one is still being processed.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_no_overrun: assert (!(sample_strobe && busy))
        else $error("seq_controller: sample strobe while busy");
    end
  end

endmodule
