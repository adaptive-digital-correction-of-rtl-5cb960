// ssblms_correlator: block correlator of the sign-sign block LMS update.
//
// The test signal is known to the digital side, so its residue in the
// corrected output v_m can be measured by correlation. For each tap k the
// block keeps a sum over K = 2^LOG2K samples of v_m[n] * sign(r[n-k]), where
// r is the test-signal replica fed in as ref_bit (1 = +1, 0 = -1); the
// multiplication is only a choice between +v_m and -v_m. A delay line of
// M-1 registers provides the delayed replica bits, tap 0 using ref_bit
// itself.
//
// At the last sample of each block the sign of every sum (+1, 0 or -1) is
// presented on upd_dir together with a one-clock upd_valid pulse, one clock
// after that sample, and all sums restart from zero. The coefficient counters
// of L_C(z) then step against that sign, which together realise
// l[(j+1)K] = l[jK] - gamma * sign(sum v_m * sign(r)). The block
// length, tap count and structure follow the document; the accumulator width
// (wide enough never to overflow) and reset behaviour are this design's.
module ssblms_correlator
  import mash_corr_pkg::*;
#(
  parameter int unsigned VM_W  = 26,
  parameter int unsigned M     = 6,
  parameter int unsigned LOG2K = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ref_bit,
  input  logic signed [VM_W-1:0] vm,
  output logic                   upd_valid,
  output dir_t                   upd_dir [M]
);

  localparam int unsigned ACC_W = VM_W + LOG2K + 1;

  logic                    ref_d [M];
  logic signed [ACC_W-1:0] acc   [M];
  logic signed [ACC_W-1:0] sum   [M];
  logic [LOG2K-1:0]        cnt;
  logic                    last;

  always_comb ref_d[0] = ref_bit;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < int'(M); k++) ref_d[k] <= 1'b0;
    end else begin
      for (int k = 1; k < int'(M); k++) ref_d[k] <= ref_d[k-1];
    end
  end

  assign last = (cnt == '1);

  always_comb begin
    for (int k = 0; k < int'(M); k++)
      sum[k] = ref_d[k] ? acc[k] + ACC_W'(vm) : acc[k] - ACC_W'(vm);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      upd_valid <= 1'b0;
      for (int k = 0; k < int'(M); k++) begin
        acc[k]     <= '0;
        upd_dir[k] <= '0;
      end
    end else begin
      cnt       <= cnt + 1'b1;
      upd_valid <= last;
      for (int k = 0; k < int'(M); k++) begin
        if (last) begin
          acc[k]     <= '0;
          upd_dir[k] <= (sum[k] > 0) ? 2'sd1 : (sum[k] < 0) ? -2'sd1 : 2'sd0;
        end else begin
          acc[k]     <= sum[k];
        end
      end
    end
  end

endmodule
