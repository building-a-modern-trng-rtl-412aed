// blum_conditioner: non-cryptographic conditioner after Blum's method.
//
// Von Neumann's extractor turns pairs of independent bits into unbiased bits
// (01 -> 0, 10 -> 1, 00 and 11 dropped), but it fails if consecutive bits are
// correlated. Blum's extension for a source that behaves like a two-state
// Markov chain applies von Neumann separately to the bits that follow a 0 and
// to the bits that follow a 1: within each of these two sub-streams the bits
// are independent and identically distributed, so both bias and first-order
// correlation are removed. For each previous-bit state the module holds one
// pending bit; the next bit seen in the same state completes the pair.
//
// Interface: valid_i/bit_i present one raw sample. valid_o/bit_o present one
// conditioned bit in the clock after the sample that completed an unequal
// pair. The output rate therefore varies with the noise. flush_i (and reset)
// clear all state. The use of Blum's method follows the Minidice description;
// this particular variant (first bit of the pair is output) is this design's
// own.
module blum_conditioner (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic flush_i,
  input  logic valid_i,
  input  logic bit_i,
  output logic valid_o,
  output logic bit_o
);

  logic       prev_q, have_prev_q;
  logic [1:0] pend_valid_q, pend_bit_q;  // indexed by previous-bit state

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      prev_q       <= 1'b0;
      have_prev_q  <= 1'b0;
      pend_valid_q <= '0;
      pend_bit_q   <= '0;
      valid_o      <= 1'b0;
      bit_o        <= 1'b0;
    end else if (flush_i) begin
      prev_q       <= 1'b0;
      have_prev_q  <= 1'b0;
      pend_valid_q <= '0;
      pend_bit_q   <= '0;
      valid_o      <= 1'b0;
      bit_o        <= 1'b0;
    end else begin
      valid_o <= 1'b0;
      if (valid_i) begin
        prev_q      <= bit_i;
        have_prev_q <= 1'b1;
        if (have_prev_q) begin
          if (!pend_valid_q[prev_q]) begin
            pend_valid_q[prev_q] <= 1'b1;
            pend_bit_q[prev_q]   <= bit_i;
          end else begin
            pend_valid_q[prev_q] <= 1'b0;
            pend_bit_q[prev_q]   <= 1'b0;
            if (pend_bit_q[prev_q] != bit_i) begin
              valid_o <= 1'b1;
              bit_o   <= pend_bit_q[prev_q];
            end
          end
        end
      end
    end
  end

endmodule
