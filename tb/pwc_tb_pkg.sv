// Reference model used by the read-out testbenches.
//
// A chamber image is the 512 module words of the branch highway, indexed by
// the 9-bit address {event, crate, module}. From it these functions work out,
// independently of the RTL, the word stream the computer must receive from the
// scanner and from the memory processor, and the number of clocks each spends
// scanning.
package pwc_tb_pkg;
  import pwc_pkg::*;

  typedef logic [7:0] image_t [512];
  typedef logic [23:0] word_q_t [$];

  // Wire addresses in scan order within the thumbwheel limits.
  function automatic void hits_in_order(input image_t img, input int lc, input int le,
                                        output int addrs[$], output int nz_words,
                                        output int words);
    addrs = {};
    nz_words = 0;
    words = 0;
    for (int e = 0; e <= le; e++)
      for (int c = 0; c <= lc; c++)
        for (int m = 0; m < 16; m++) begin
          int idx = e * 128 + c * 16 + m;
          words++;
          if (img[idx] != 0) nz_words++;
          for (int b = 0; b < 8; b++)
            if (img[idx][b]) addrs.push_back(idx * 8 + b);
        end
  endfunction

  // Scanner: pairs of addresses (upper half first) until 128 half-words, a
  // half-filled last word, then the count word.
  function automatic void scanner_stream(input image_t img, input int lc, input int le,
                                         output word_q_t q, output int scan_cycles);
    int addrs[$];
    int nz, w, n;
    logic ovf;
    hits_in_order(img, lc, le, addrs, nz, w);
    q = {};
    n = (addrs.size() > 128) ? 128 : addrs.size();
    ovf = (n == 128);
    for (int i = 0; i < n; i += 2) begin
      logic [11:0] lo;
      lo = (i + 1 < n) ? 12'(addrs[i+1]) : 12'd0;
      q.push_back({12'(addrs[i]), lo});
    end
    q.push_back({ovf, 15'd0, 8'(n)});
    if (ovf) begin
      // the scan stops inside the module word that held the 128th hit
      int idx_last = addrs[127] / 8;
      int wcount = 0, nzc = 0, bits = 0;
      for (int e = 0; e <= le; e++)
        for (int c = 0; c <= lc; c++)
          for (int m = 0; m < 16; m++) begin
            int idx = e * 128 + c * 16 + m;
            if (idx <= idx_last) begin
              wcount++;
              if (img[idx] != 0) nzc++;
            end
          end
      bits = 8 * (nzc - 1) + (addrs[127] % 8) + 1;
      scan_cycles = 2 * wcount + bits + 1;
    end else begin
      scan_cycles = 2 * w + 8 * nz + 1;
    end
  endfunction

  // Memory processor: identification word, stored words (at most 63, an
  // unused lower half reads 0), and a word of zeroes.
  function automatic void processor_stream(input image_t img, input int lc, input int le,
                                           output word_q_t q, output int scan_cycles);
    int addrs[$];
    int nz, w, n;
    logic ovf;
    hits_in_order(img, lc, le, addrs, nz, w);
    q = {};
    n = (addrs.size() > 126) ? 126 : addrs.size();
    ovf = (addrs.size() > 126);
    q.push_back({ovf, 15'd0, 8'(n)});
    for (int i = 0; i < n; i += 2) begin
      logic [11:0] lo;
      lo = (i + 1 < n) ? 12'(addrs[i+1]) : 12'd0;
      q.push_back({12'(addrs[i]), lo});
    end
    q.push_back(24'd0);
    scan_cycles = 8 * (w + 1);
  endfunction

  // Random image with about `density` ones per 1000 bits.
  function automatic image_t random_image(input int density);
    image_t img;
    for (int i = 0; i < 512; i++) begin
      img[i] = '0;
      for (int b = 0; b < 8; b++)
        if (($urandom % 1000) < density) img[i][b] = 1'b1;
    end
    return img;
  endfunction

endpackage
