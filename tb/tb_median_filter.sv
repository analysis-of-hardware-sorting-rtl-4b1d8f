// tb_median_filter: the 3x3 median filter benchmark on the sorting core at
// its default parameters (single-cycle sorting lanes).
//
// For each image size (16x16, 32x32, 64x64, 8-bit pixels, random content
// plus flat regions) the bench computes the median of every interior 3x3
// window with the SORT instruction and compares it with a software median.
// Packing: in 8-bit mode four windows share one SORT; window l's nine pixels
// go to byte l of vector registers 0..8 and registers 9..31 hold zero, so
// after the descending sort byte l of register 4 is window l's median. The
// 16x16 image is also filtered in 16-bit mode (two windows per SORT) and
// 32-bit mode (one window per SORT). Each SORT must complete in one cycle
// without a stall, and the number of SORTs must be ceil(windows / lanes).
module tb_median_filter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic instr_valid, stall, done, illegal;
  logic [31:0] instr;
  logic vwe, vtwe, vlwe;
  logic [4:0] vwaddr, vraddr, vtaddr;
  logic [31:0] vwdata, vrdata;
  logic [15:0] vtdata, vtrdata;
  logic [5:0] vl_in, vl_out;
  int checks = 0, failures = 0;
  int n_sorts = 0, n_done = 0, n_stall = 0;

  always #5 clk = ~clk;

  sort_core dut (
    .clk, .rst_n, .instr_valid_i(instr_valid), .instr_i(instr), .stall_o(stall),
    .sort_done_o(done), .illegal_o(illegal),
    .vwe_i(vwe), .vwaddr_i(vwaddr), .vwdata_i(vwdata), .vraddr_i(vraddr), .vrdata_o(vrdata),
    .vtwe_i(vtwe), .vtaddr_i(vtaddr), .vtdata_i(vtdata), .vtdata_o(vtrdata),
    .vlwe_i(vlwe), .vl_i(vl_in), .vl_o(vl_out));

  always @(posedge clk) begin
    if (done) n_done++;
    if (stall) n_stall++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] img [64][64];

  function automatic logic [7:0] sw_median(int r, int c);
    int v [9];
    int k = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++) v[k++] = img[r+dr][c+dc];
    for (int i = 1; i < 9; i++) begin
      int key = v[i];
      int j = i - 1;
      while (j >= 0 && v[j] > key) begin v[j+1] = v[j]; j--; end
      v[j+1] = key;
    end
    return 8'(v[4]);
  endfunction

  // filter an n x n image with elements of w bits (32 / w windows per SORT)
  task automatic filter(int n, int w);
    int lanes = 32 / w;
    int win_r [4], win_c [4];
    int nwin = (n - 2) * (n - 2);
    int idx = 0, sorts_before = n_sorts;
    int cyc;
    while (idx < nwin) begin
      int used = 0;
      logic [31:0] regs [32];
      foreach (regs[i]) regs[i] = '0;
      for (int l = 0; l < lanes && idx < nwin; l++) begin
        int k = 0;
        win_r[l] = 1 + idx / (n - 2);
        win_c[l] = 1 + idx % (n - 2);
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++) begin
            regs[k] |= 32'(img[win_r[l]+dr][win_c[l]+dc]) << (l * w);
            k++;
          end
        idx++;
        used++;
      end
      for (int i = 0; i < 32; i++) begin
        vwe = 1; vwaddr = 5'(i); vwdata = regs[i];
        @(negedge clk);
      end
      vwe = 0;
      // SORT, funct3 by width; rd/rs1/imm random
      instr = $urandom;
      instr[6:0] = 7'b0001011;
      instr[14:12] = (w == 32) ? 3'b000 : (w == 16) ? 3'b001 : 3'b010;
      instr_valid = 1;
      cyc = 0;
      do begin #1; cyc++; if (!stall) break; @(negedge clk); end while (cyc < 100);
      @(negedge clk);
      instr_valid = 0;
      n_sorts++;
      checks++;
      if (cyc != 1) begin failures++; $display("FAIL SORT took %0d cycles", cyc); end
      vraddr = 5'd4;
      #1;
      for (int l = 0; l < used; l++) begin
        logic [7:0] got = 8'(vrdata >> (l * w));
        logic [7:0] exp = sw_median(win_r[l], win_c[l]);
        checks++;
        if (got !== exp || (w > 8 && (vrdata >> (l * w + 8)) % (1 << (w - 8)) != 0)) begin
          failures++;
          $display("FAIL %0dx%0d w=%0d window (%0d,%0d): got %0d exp %0d",
                   n, n, w, win_r[l], win_c[l], got, exp);
        end
      end
    end
    checks++;
    if (n_sorts - sorts_before != (nwin + lanes - 1) / lanes) begin
      failures++;
      $display("FAIL %0dx%0d w=%0d: %0d SORTs", n, n, w, n_sorts - sorts_before);
    end
    $display("%0dx%0d image, %0d-bit lanes: %0d windows, %0d SORT instructions",
             n, n, w, nwin, n_sorts - sorts_before);
  endtask

  initial begin
    instr_valid = 0; instr = '0; vwe = 0; vtwe = 0; vlwe = 0;
    vwaddr = 0; vraddr = 0; vtaddr = 0; vwdata = 0; vtdata = 0; vl_in = 0;
    for (int r = 0; r < 64; r++)
      for (int c = 0; c < 64; c++)
        img[r][c] = (r >= 20 && r < 28) ? 8'd128 : 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    filter(16, 8);
    filter(16, 16);
    filter(16, 32);
    filter(32, 8);
    filter(64, 8);
    checks++;
    if (n_done != n_sorts || n_stall != 0) begin
      failures++;
      $display("FAIL done pulses %0d for %0d SORTs, %0d stall cycles", n_done, n_sorts, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
