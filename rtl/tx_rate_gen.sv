// tx_rate_gen: sample-rate enables of the transmitter's interpolation chain.
//
// The whole transmitter runs on one system clock at the DAC rate. The
// document's clock tree divides that clock by N, then M, then three times by
// 2; here the dividers produce one-cycle enables instead of derived clocks:
//   cic2_in  every N cycles        (input of the second CIC filter, x N)
//   cic1_in  every N*M cycles      (input of the first CIC filter, x M)
//   hb2_in   every 2*N*M cycles    (input of the second half-band, x 2)
//   hb1_in   every 4*N*M cycles    (input of the first half-band, x 2)
//   chip     every 8*N*M cycles    (chip clock: spreader and SRRC input, x 2)
// Every slower enable coincides with all faster ones. div_m and div_n are
// run-time settings (M = 2..8, N = 3..12 as the document's figure prints);
// they are taken when the counters wrap.
module tx_rate_gen (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] div_m,
  input  logic [3:0] div_n,
  output logic       cic2_in,
  output logic       cic1_in,
  output logic       hb2_in,
  output logic       hb1_in,
  output logic       chip
);
  logic [3:0] cnt_n, cnt_m;
  logic [2:0] cnt_8;

  always_comb begin
    cic2_in = (cnt_n == 4'd0);
    cic1_in = cic2_in && (cnt_m == 4'd0);
    hb2_in  = cic1_in && (cnt_8[0]   == 1'b0);
    hb1_in  = cic1_in && (cnt_8[1:0] == 2'd0);
    chip    = cic1_in && (cnt_8      == 3'd0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_n <= '0;
      cnt_m <= '0;
      cnt_8 <= '0;
    end else begin
      cnt_n <= (cnt_n >= div_n - 4'd1) ? 4'd0 : cnt_n + 4'd1;
      if (cic2_in) begin
        cnt_m <= (cnt_m >= div_m - 4'd1) ? 4'd0 : cnt_m + 4'd1;
        if (cic1_in) cnt_8 <= cnt_8 + 3'd1;
      end
    end
  end

  a_div_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    div_m != 4'd0 && div_n != 4'd0)
    else $error("tx_rate_gen: divider of zero");
endmodule
