// cordic_atan: arctangent of (x, y) by an iterative vectoring CORDIC.
//
// The carrier-recovery initialisation needs atan(Im/Re) of two accumulated
// complex sums. Instead of a divider (Q/I) and an arctangent table, the
// vector is rotated towards the positive real axis by +-atan(2^-i),
// i = 0..ITER-1, with shifts and adds only, and the applied rotations are
// summed. A vector in the left half plane is first turned by pi. The angle is
// a signed fraction of a turn (2^16 = 2 pi), so it wraps naturally; mag is
// the CORDIC-scaled magnitude (1.6468 * |x + jy|).
//
// Interface: start loads x, y (busy until done). done pulses for one cycle
// ITER + 2 cycles after the start cycle, with angle and mag valid from then on.
module cordic_atan #(
  parameter int IN_W = 40,
  parameter int ITER = 15
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [IN_W-1:0] x,
  input  logic signed [IN_W-1:0] y,
  output logic signed [15:0]     angle,
  output logic [IN_W+1:0]        mag,
  output logic                   done,
  output logic                   busy
);
  localparam int W = IN_W + 2;

  // atan(2^-i) in units of 2 pi / 2^16
  function automatic logic [15:0] atan_tab(int i);
    case (i)
      0: return 16'd8192;  1: return 16'd4836;  2: return 16'd2555;
      3: return 16'd1297;  4: return 16'd651;   5: return 16'd326;
      6: return 16'd163;   7: return 16'd81;    8: return 16'd41;
      9: return 16'd20;    10: return 16'd10;   11: return 16'd5;
      12: return 16'd3;    13: return 16'd1;    14: return 16'd1;
      default: return 16'd0;
    endcase
  endfunction

  logic signed [W-1:0] xr, yr;
  logic [15:0]         z;
  logic [4:0]          it;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= '0; yr <= '0; z <= '0; it <= '0;
      busy <= 1'b0; done <= 1'b0;
      angle <= '0; mag <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        it   <= '0;
        if (x < 0) begin
          xr <= -W'(x);
          yr <= -W'(y);
          z  <= 16'h8000;
        end else begin
          xr <= W'(x);
          yr <= W'(y);
          z  <= '0;
        end
      end else if (busy) begin
        if (int'(it) == ITER) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          angle <= $signed(z);
          mag   <= (W)'(xr);
        end else begin
          if (yr >= 0) begin
            xr <= xr + (yr >>> it);
            yr <= yr - (xr >>> it);
            z  <= z + atan_tab(int'(it));
          end else begin
            xr <= xr - (yr >>> it);
            yr <= yr + (xr >>> it);
            z  <= z - atan_tab(int'(it));
          end
          it <= it + 5'd1;
        end
      end
    end
  end
endmodule
