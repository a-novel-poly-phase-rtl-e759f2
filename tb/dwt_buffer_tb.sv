// dwt_buffer_tb: checks the stage-2 buffer with three levels (entries) and
// a 4-tap filter (windows of two pairs).
//
// Random writes from the stage-1 port (entry 0) and the feedback port
// (entries 1 and 2), in the same cycle or not, and random reads of pending
// entries. A reference model keeps every sample written to each entry;
// every cycle the pending flags must match it, and every read window must
// hold the newest complete pair and the pair before it (zero before the
// first). Overflow must stay low throughout, then a deliberate overwrite of
// an unread pair must raise it.
module dwt_buffer_tb;
  localparam int DW = 16, L = 4, NC = L / 2, NB = 3, IW = 2;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                  s1_valid = 0, fb_valid = 0, rd_en = 0, overflow;
  logic [DW-1:0]         s1_data = '0, fb_data = '0;
  logic [IW-1:0]         fb_index = '0, rd_index = '0;
  logic [NB-1:0]         pend;
  logic [NC-1:0][DW-1:0] rd_even, rd_odd;

  dwt_buffer #(.DW(DW), .L(L), .NB(NB), .IW(IW)) dut (
    .clk, .rst, .s1_valid, .s1_data, .fb_valid, .fb_index, .fb_data,
    .rd_en, .rd_index, .pend, .rd_even, .rd_odd, .overflow
  );

  int samp[NB][$];
  bit mpend[NB];
  int nreads = 0, nboth = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sample_at(int b, int i);
    return (i < 0) ? 0 : samp[b][i];
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 3000; t++) begin
      int rb, wb;
      bit do_rd, do_s1, do_fb;
      @(negedge clk);
      // pending flags against the model
      checks++;
      for (int b = 0; b < NB; b++)
        if (pend[b] != mpend[b]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d pend[%0d]=%b expected %b", t, b, pend[b], mpend[b]);
        end
      checks++;
      if (overflow) begin
        failures++;
        $display("FAIL overflow set in normal use");
      end
      // choose a read
      do_rd = 0;
      rb = 0;
      if ($urandom_range(0, 3) != 0) begin
        int start;
        start = $urandom_range(0, NB - 1);
        for (int k = 0; k < NB; k++)
          if (!do_rd && mpend[(start + k) % NB]) begin
            do_rd = 1;
            rb = (start + k) % NB;
          end
      end
      // choose writes that cannot overwrite an unread pair
      do_s1 = ($urandom_range(0, 1) == 1);
      if (do_s1 && samp[0].size() % 2 == 1 && mpend[0] && !(do_rd && rb == 0)) do_s1 = 0;
      wb = $urandom_range(1, NB - 1);
      do_fb = ($urandom_range(0, 1) == 1);
      if (do_fb && samp[wb].size() % 2 == 1 && mpend[wb] && !(do_rd && rb == wb)) do_fb = 0;
      if (do_s1 && do_fb) nboth++;

      rd_en = do_rd;
      rd_index = IW'(rb);
      s1_valid = do_s1;
      s1_data = DW'($urandom);
      fb_valid = do_fb;
      fb_index = IW'(wb);
      fb_data = DW'($urandom);
      #1;
      if (do_rd) begin
        int p;
        p = samp[rb].size() / 2 - 1;   // newest complete pair
        nreads++;
        for (int m = 0; m < NC; m++) begin
          checks++;
          if (int'(rd_even[m]) != sample_at(rb, 2 * (p - m)) ||
              int'(rd_odd[m]) != sample_at(rb, 2 * (p - m) + 1)) begin
            failures++;
            if (failures < 10)
              $display("FAIL read entry %0d pair -%0d: %0d %0d expected %0d %0d", rb, m,
                       rd_even[m], rd_odd[m], sample_at(rb, 2 * (p - m)), sample_at(rb, 2 * (p - m) + 1));
          end
        end
        mpend[rb] = 0;
      end
      if (do_s1) begin
        samp[0].push_back(int'(s1_data));
        if (samp[0].size() % 2 == 0) mpend[0] = 1;
      end
      if (do_fb) begin
        samp[wb].push_back(int'(fb_data));
        if (samp[wb].size() % 2 == 0) mpend[wb] = 1;
      end
    end
    // deliberate overwrite: four samples into entry 0, no reads
    @(negedge clk);
    rd_en = 0;
    fb_valid = 0;
    s1_valid = 1;
    repeat (4) @(negedge clk);
    s1_valid = 0;
    @(negedge clk);
    checks++;
    if (!overflow) begin
      failures++;
      $display("FAIL overflow not flagged");
    end
    checks++;
    if (nreads < 500 || nboth < 100) begin
      failures++;
      $display("FAIL too few reads (%0d) or simultaneous writes (%0d)", nreads, nboth);
    end
    $display("reads=%0d simultaneous writes=%0d", nreads, nboth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
