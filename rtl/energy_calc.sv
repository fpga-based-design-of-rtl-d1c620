// Block energy calculation, the sum-of-squares stage after each Goertzel filter.
//
// Over one detection block (250 samples by default) it accumulates the square of the
// filter output, scaled down by 2^SHIFT before squaring so that the sum of a full-scale
// block fits in 32 bits; the running sum saturates at the 32-bit maximum instead of
// wrapping. When the sample flagged in_last has been added, the block energy is loaded
// into the output register and out_valid pulses for one clock (one clock after the
// input). A sample flagged in_first restarts the sum.
//
// Squaring and summing over the block follow the design description; the pre-scaling,
// the saturation and the output register are this design's choices.
module energy_calc
  import hearing_aid_pkg::*;
#(
  parameter int unsigned SHIFT = 12
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_first,
  input  logic    in_last,
  input  acc_t    y,
  output logic    out_valid,
  output energy_t energy
);

  localparam logic [ACC_W:0] E_MAX = {1'b0, {ACC_W{1'b1}}};

  acc_t            y_scaled;
  logic [2*ACC_W-1:0] sq;
  logic [ACC_W:0]  sum_ext;
  energy_t         acc, acc_next;

  always_comb begin
    y_scaled = y >>> SHIFT;
    sq       = unsigned'((2*ACC_W)'(y_scaled) * (2*ACC_W)'(y_scaled));
    sum_ext  = {1'b0, (in_first ? energy_t'(0) : acc)} +
               ((sq > (2*ACC_W)'(E_MAX)) ? E_MAX : sq[ACC_W:0]);
    acc_next = (sum_ext > E_MAX) ? E_MAX[ACC_W-1:0] : sum_ext[ACC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      energy    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid & in_last;
      if (in_valid) begin
        acc <= acc_next;
        if (in_last) energy <= acc_next;
      end
    end
  end

endmodule
