// pn_code_store: the locally stored PN code h[0..N-1] of the signal detector.
//
// The coefficients are held in a bank of N registers so that every sensor can
// read its four coefficients at the same time, as the sensor array needs the
// whole vector h[0:N-1] in parallel. A coefficient is written through a simple
// addressed write port: when h_we is high at a rising clock edge, h[h_addr]
// takes h_data; the new value is visible on h_all one cycle later.
// Reset clears all coefficients to zero.
//
// The document only says the PN code is stored locally; the register bank,
// the write port and the reset value are this design's choices.
module pn_code_store #(
  parameter int unsigned N_TAPS = ssnoc_pkg::N_TAPS_DEF,
  parameter int unsigned H_W    = ssnoc_pkg::H_W_DEF,
  localparam int unsigned A_W   = (N_TAPS > 1) ? $clog2(N_TAPS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       h_we,
  input  logic [A_W-1:0]             h_addr,
  input  logic signed [H_W-1:0]      h_data,
  output logic signed [H_W-1:0]      h_all [N_TAPS]
);

  logic signed [H_W-1:0] h_q [N_TAPS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < N_TAPS; j++) h_q[j] <= '0;
    end else if (h_we && (32'(h_addr) < N_TAPS)) begin
      h_q[h_addr] <= h_data;
    end
  end

  assign h_all = h_q;

endmodule
