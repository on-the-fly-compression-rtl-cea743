// ocda_ref_pkg -- bit-serial reference model of the accelerator's codes,
// used by the testbenches to predict what the hardware must produce.
//
// Codes are built one bit at a time into a queue, first-sent bit first,
// directly from the written algorithms, independently of the RTL's
// shift-and-mask formulation. Also provides test-data generators that mimic
// the areas of a JOP image (bytecode words, zero-rich class data, slowly
// changing pointers, unstructured data).
package ocda_ref_pkg;
  import ocda_pkg::*;

  function automatic void put_bits(ref bit q[$], input logic [63:0] v, input int n);
    for (int k = n - 1; k >= 0; k--) q.push_back(v[k]);
  endfunction

  // Append the code of word w (scheme s, difference base b) to q.
  function automatic void ref_encode(ref bit q[$], input word_t w, input scheme_e s,
                                     input word_t b, input bc_table_t t);
    case (s)
      SCH_NONE: put_bits(q, 64'(w), 32);
      SCH_ZERO: begin
        if (w == 0) q.push_back(1'b0);
        else begin q.push_back(1'b1); put_bits(q, 64'(w), 32); end
      end
      SCH_TABLE: begin
        for (int j = 0; j < 4; j++) begin
          logic [7:0] bc;
          int found;
          bc = w[31 - 8*j -: 8];
          found = -1;
          for (int k = 0; k < 16 && found < 0; k++) if (t[k] == bc) found = k;
          if (found >= 0) begin q.push_back(1'b1); put_bits(q, 64'(found), 4); end
          else begin q.push_back(1'b0); put_bits(q, 64'(bc), 8); end
        end
      end
      default: begin // SCH_DIFF
        int i;
        i = 0;
        for (int k = 31; k >= 0 && i == 0; k--) if (w[k] != b[k]) i = k;
        put_bits(q, 64'(i), 5);
        put_bits(q, 64'(w), i + 1);
      end
    endcase
  endfunction

  function automatic int code_len(input word_t w, input scheme_e s, input word_t b, input bc_table_t t);
    bit q[$];
    ref_encode(q, w, s, b, t);
    return q.size();
  endfunction

  // A table of 16 distinct bytecodes.
  function automatic bc_table_t make_table(input int seed);
    bc_table_t t;
    for (int k = 0; k < 16; k++) t[k] = 8'((seed + 37 * k) & 8'hff);
    return t;
  endfunction

  // Test data resembling each image area. prev is the previous word of the area.
  function automatic word_t gen_word(input scheme_e s, input word_t prev, input bc_table_t t);
    word_t w;
    case (s)
      SCH_TABLE: begin
        for (int j = 0; j < 4; j++)
          w[31 - 8*j -: 8] = ($urandom_range(0, 9) < 7) ? t[$urandom_range(0, 15)] : 8'($urandom);
      end
      SCH_ZERO: w = ($urandom_range(0, 9) < 8) ? '0 : (($urandom_range(0, 1) != 0) ? 32'($urandom_range(0, 255)) : $urandom);
      SCH_DIFF: begin
        case ($urandom_range(0, 9))
          0:       w = $urandom;
          1:       w = prev;
          default: w = prev + 32'($urandom_range(0, 300));
        endcase
      end
      default: w = $urandom;
    endcase
    return w;
  endfunction

endpackage
