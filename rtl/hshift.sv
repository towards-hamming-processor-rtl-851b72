// hshift: logical shift of one Hamming-coded operand by a constant amount.
//
// Data bit r_j is wired from raw input bit x_(j-SHAMT) (left shift) or
// x_(j+SHAMT) (right shift), zero where the shift runs off the word. Each
// Hamming bit comes from its own channel that corrects X, shifts the
// corrected word and takes the parity of the bits h_i covers. One input error
// moves to at most one output data bit (or drops out), and the Hamming bits
// are computed from the corrected word, so the result stays correctable.
// Combinational.
//
// The document only says that shift is built like the bit-wise AND block.
// The constant shift amount, its direction and the zero fill are choices of
// this design.
module hshift #(
  parameter int unsigned K     = 4,
  parameter int unsigned SHAMT = 1,
  parameter bit          LEFT  = 1'b1,
  localparam int unsigned M    = ham_pkg::ham_m(K)
) (
  input  logic [K-1:0] x_d,
  input  logic [M-1:0] x_h,
  output logic [K-1:0] r_d,
  output logic [M-1:0] r_h
);

  for (genvar j = 0; j < K; j++) begin : g_d
    if (LEFT && j >= SHAMT) begin : g_l
      assign r_d[j] = x_d[j-SHAMT];
    end else if (!LEFT && j + SHAMT < K) begin : g_r
      assign r_d[j] = x_d[j+SHAMT];
    end else begin : g_z
      assign r_d[j] = 1'b0;
    end
  end

  for (genvar i = 0; i < M; i++) begin : g_h
    ham_channel #(
      .K(K), .OP(LEFT ? ham_pkg::CH_SHL : ham_pkg::CH_SHR),
      .OUT_PARITY(1'b1), .IDX(i), .SHAMT(SHAMT)
    ) u_ch (
      .x_d(x_d), .x_h(x_h), .y_d('0), .y_h('0), .out(r_h[i])
    );
  end

endmodule
