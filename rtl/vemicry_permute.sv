// vemicry_permute -- whole-register rearrangements (VTRANSP, VWSHL, VWSHR).
//
// These instructions move data between elements that sit in different lanes, so
// they are computed here for the whole register at once and the lanes only write
// the result back, group by group. Combinational.
//   VTRANSP n=0 : copy.
//   VTRANSP n!=0: every block of 4 consecutive words is a 4x4 byte matrix (word =
//                 column, most significant byte = row 0) and is transposed. Words
//                 past the last full block are copied.
//   VWSHL n     : element i <- element i-n, zeros enter at element 0; the word
//                 shifted out of element P-n becomes the new CAR.
//   VWSHR n     : element i <- element i+n; CAR enters at element P-n and zeros
//                 above it (element 0 is the least significant word).
// The instruction semantics follow the paper's instruction list; the block
// size 4, the byte order and what happens for n > 1 are this design's reading.
module vemicry_permute
  import vemicry_pkg::*;
#(
  parameter int P = 8
) (
  input  vop_t                 op,
  input  logic [NW-1:0]        n,
  input  logic [P-1:0][W-1:0]  src,
  input  logic [W-1:0]         car,
  output logic [P-1:0][W-1:0]  dst,
  output logic                 car_we,
  output logic [W-1:0]         car_out
);
  always_comb begin
    dst     = src;
    car_we  = 1'b0;
    car_out = '0;
    case (op)
      OP_VTRANSP: begin
        if (n != '0)
          for (int blk = 0; blk + 4 <= P; blk += 4)
            for (int c = 0; c < 4; c++)        // output word (column)
              for (int rr = 0; rr < 4; rr++)   // output byte, 0 = most significant
                dst[blk + c][31 - 8*rr -: 8] = src[blk + rr][31 - 8*c -: 8];
      end
      OP_VWSHL: begin
        car_we = 1'b1;
        car_out = car;
        for (int i = 0; i < P; i++)
          dst[i] = (i >= int'(n)) ? src[i - int'(n)] : '0;
        if (n == '0)            car_we  = 1'b0;
        else if (int'(n) <= P)  car_out = src[P - int'(n)];
        else                    car_out = '0;
      end
      OP_VWSHR: begin
        for (int i = 0; i < P; i++) begin
          if (n == '0)                  dst[i] = src[i];
          else if (i + int'(n) < P)     dst[i] = src[i + int'(n)];
          else if (i + int'(n) == P)    dst[i] = car;
          else                          dst[i] = '0;
        end
      end
      default: ;
    endcase
  end
endmodule
