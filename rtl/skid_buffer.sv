// skid_buffer: one-entry valid/ready skid buffer.
//
// When the downstream side accepts (M_ready high) the buffer is a plain
// pass-through: S_data/S_valid appear on M_data/M_valid in the same cycle.
// When the downstream side stalls while a word is being accepted upstream,
// that word is copied into the internal register; in the next cycles the
// register drives the output until the downstream side takes it. S_ready is
// the inverse of the register's full flag, so it comes straight from a
// flip-flop and never depends combinationally on M_ready. No word is lost
// and, with a continuously ready consumer, one word moves per clock.
//
// Interface: S_* is the upstream (slave) side, M_* the downstream (master)
// side, named as in the block diagram of the design. clk rising edge,
// rstn active-low synchronous reset (empty buffer).
// The pass-through/register structure follows the design description; the
// synchronous reset style is this design's own choice.
module skid_buffer #(
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          rstn,
  // upstream
  input  logic [DW-1:0] S_data,
  input  logic          S_valid,
  output logic          S_ready,
  // downstream
  output logic [DW-1:0] M_data,
  output logic          M_valid,
  input  logic          M_ready
);

  logic          r_valid;
  logic [DW-1:0] r_data;

  always_ff @(posedge clk) begin
    if (!rstn) begin
      r_valid <= 1'b0;
    end else if (S_valid && S_ready && !M_ready) begin
      // output stalled while a word comes in: park it
      r_valid <= 1'b1;
    end else if (M_ready) begin
      r_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rstn) begin
      r_data <= '0;
    end else if (S_valid && S_ready) begin
      r_data <= S_data;
    end
  end

  assign S_ready = !r_valid;
  assign M_valid = S_valid || r_valid;
  assign M_data  = r_valid ? r_data : S_data;

endmodule
