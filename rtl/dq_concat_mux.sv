// dq_concat_mux: output side of the model's internal data bus.
//
// Concatenates the DW-bit read words of the NCHIPS chips (chip i at bits
// i*DW and up) into one DQ_W-bit word. The word goes to the board-memory side
// (dq_out_m, row write back) and to the DIMM data pins (dq_out_c). The pins
// are driven (dq_oe high) in the cycle after a controller-side read access,
// when the chips' read data is valid; dqs_t toggles on every driven beat as
// the read data strobe.
// Timing: dq_out_c/dq_oe follow rd_c by one model clock.
// The concatenation and the routing to controller or board memory follow the
// document; the strobe form is this design's choice.
module dq_concat_mux #(
  parameter int unsigned NCHIPS = 16,
  parameter int unsigned DW     = 4,
  localparam int unsigned DQ_W  = NCHIPS * DW
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      rd_c,        // controller-side read access this cycle
  input  logic [NCHIPS-1:0][DW-1:0] chip_rdata,
  output logic [DQ_W-1:0]           dq_out_c,
  output logic                      dq_oe,
  output logic                      dqs_t,
  output logic [DQ_W-1:0]           dq_out_m
);

  logic [DQ_W-1:0] word;
  logic            dqs_q;

  always_comb
    for (int i = 0; i < NCHIPS; i++) word[i*DW +: DW] = chip_rdata[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dq_oe <= 1'b0;
      dqs_q <= 1'b0;
    end else begin
      dq_oe <= rd_c;
      if (rd_c) dqs_q <= ~dqs_q;
    end
  end

  assign dq_out_c = dq_oe ? word : '0;
  assign dq_out_m = word;
  assign dqs_t    = dq_oe & ~dqs_q;

endmodule
