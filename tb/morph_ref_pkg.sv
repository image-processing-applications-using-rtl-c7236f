// morph_ref_pkg: reference results for the testbenches, written from the
// textbook definitions of the primitive operations on a 3x3 window
// w[3*r + c] (r = 0 top row, c = 0 left column, w[4] the centre):
//   dilation  D(p) = OR  over SE elements b of A(p - b)
//   erosion   E(p) = AND over SE elements b of A(p + b)
//   copy, complement, max / min with the aux pixel, and translation (the
//   window pixel whose index is tdir).
package morph_ref_pkg;
  import zelig_pkg::*;

  function automatic logic ref_op(morph_op_e op, logic [8:0] w, logic a, logic [8:0] s, logic [3:0] t);
    logic r;
    int dr, dc;
    unique case (op)
      OP_DILATE: begin
        r = 0;
        for (int k = 0; k < 9; k++) if (s[k]) begin
          dr = k / 3 - 1; dc = k % 3 - 1;            // offset b of the element
          r |= w[3 * (1 - dr) + (1 - dc)];           // pixel at p - b
        end
      end
      OP_ERODE: begin
        r = 1;
        for (int k = 0; k < 9; k++) if (s[k]) begin
          dr = k / 3 - 1; dc = k % 3 - 1;
          r &= w[3 * (1 + dr) + (1 + dc)];           // pixel at p + b
        end
      end
      OP_COPY:  r = w[4];
      OP_COMP:  r = !w[4];
      OP_MAX:   r = w[4] | a;
      OP_MIN:   r = w[4] & a;
      default:  r = w[t];
    endcase
    return r;
  endfunction
endpackage
