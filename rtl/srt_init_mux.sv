// Input multiplexer of the first column.
//
// At the start of a division (`first` high) the first column reads the
// dividend: a normalised mantissa 1.f in [1, 2), which is the initial shifted
// remainder 2R_0. It is put in the remainder format of the array: integer
// bits 001, the fraction in the sum vector, a zero carry vector and no
// out-of-range flags. Otherwise the first column reads the remainder fed back
// from the last column of the ring. Combinational. The multiplexer and its
// place follow the original block diagram; the entry format is this
// design's choice.
module srt_init_mux
  import srt_pkg::*;
#(
  parameter int FRAC = 47
) (
  input  logic                first,
  input  logic [FRAC:0]       dividend,
  input  logic [INT_BITS-1:0] fb_top,
  input  logic [FRAC-1:0]     fb_fs,
  input  logic [FRAC-1:0]     fb_fc,
  input  logic                fb_ovf,
  input  logic                fb_ovf_prev,
  output logic [INT_BITS-1:0] out_top,
  output logic [FRAC-1:0]     out_fs,
  output logic [FRAC-1:0]     out_fc,
  output logic                out_ovf,
  output logic                out_ovf_prev
);

  always_comb begin
    if (first) begin
      out_top      = {{(INT_BITS-1){1'b0}}, dividend[FRAC]};
      out_fs       = dividend[FRAC-1:0];
      out_fc       = '0;
      out_ovf      = 1'b0;
      out_ovf_prev = 1'b0;
    end else begin
      out_top      = fb_top;
      out_fs       = fb_fs;
      out_fc       = fb_fc;
      out_ovf      = fb_ovf;
      out_ovf_prev = fb_ovf_prev;
    end
  end

endmodule
