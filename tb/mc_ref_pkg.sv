// mc_ref_pkg: reference model of the multi-coding scheme for the testbenches.
//
// Written independently of the RTL: each coding is expressed on a 64-bit
// container with the word width passed in, and the encoder choice is a plain
// search for the smallest Hamming distance (lowest code wins a tie).
package mc_ref_pkg;

  function automatic logic [63:0] wmask(input int w);
    return (w >= 64) ? '1 : ((64'd1 << w) - 64'd1);
  endfunction

  // code: 0 invert, 1 swap adjacent, 2 invert even bits, 3 invert odd bits
  function automatic logic [63:0] ref_code(input int code, input logic [63:0] d, input int w);
    logic [63:0] r;
    r = d & wmask(w);
    case (code)
      0: r = ~d;
      1: begin
        for (int i = 0; i + 1 < w; i += 2) begin
          r[i]   = d[i+1];
          r[i+1] = d[i];
        end
      end
      2: r = d ^ 64'h5555_5555_5555_5555;
      default: r = d ^ 64'hAAAA_AAAA_AAAA_AAAA;
    endcase
    return r & wmask(w);
  endfunction

  function automatic int ref_hd(input logic [63:0] a, input logic [63:0] b, input int w);
    int n;
    n = 0;
    for (int i = 0; i < w; i++) if (a[i] != b[i]) n++;
    return n;
  endfunction

  // Best coding of d against the previous bus word p: returns the code.
  function automatic int ref_best(input logic [63:0] d, input logic [63:0] p, input int w);
    int best, best_hd, h;
    best = 0;
    best_hd = 1000;
    for (int c = 0; c < 4; c++) begin
      h = ref_hd(ref_code(c, d, w), p, w);
      if (h < best_hd) begin
        best = c;
        best_hd = h;
      end
    end
    return best;
  endfunction

endpackage
