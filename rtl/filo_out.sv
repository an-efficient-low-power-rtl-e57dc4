// filo_out: FILO reorder buffer and output register.
//
// Trace-back produces the decoded bits of a block of L columns last column first. This unit
// puts them back in source order with two L-bit buffers used in turn: the bits of one block are
// stored at their column index in one buffer while the previous block is read out of the other
// from column 0 up, one bit per incoming bit; the last column written is the first read. The
// buffers swap when column 0 (the last bit of a block) arrives. The output bit is registered.
//
// Timing: out_valid pulses one cycle after an in_valid that finds a complete block in the
// other buffer, so a block leaves during the arrival of the next one (L input bits later).
// Reset (synchronous, active low) empties both buffers.
//
// The FILO reorder and the output register follow the source description; the double buffer
// is this design's choice.
module filo_out #(
  parameter int unsigned L  = 10,
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_bit,
  input  logic [LW-1:0] in_idx,
  output logic          out_valid,
  output logic          out_bit
);

  logic [L-1:0]  buf_q [2];
  logic          wsel;      // buffer being filled
  logic          full;      // the other buffer holds a complete block
  logic [LW-1:0] rptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wsel      <= 1'b0;
      full      <= 1'b0;
      rptr      <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= in_valid && full;
      if (in_valid) begin
        buf_q[wsel][in_idx] <= in_bit;
        out_bit             <= buf_q[!wsel][rptr];
        if (in_idx == '0) begin
          wsel <= !wsel;
          full <= 1'b1;
          rptr <= '0;
        end else begin
          rptr <= rptr + 1'b1;
        end
      end
    end
  end

endmodule
