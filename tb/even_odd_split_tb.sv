// even_odd_split_tb: checks the poly-phase input splitter.
//
// The reference frame 104, 105, 103, 104, 46, 119, 97, 118 must come out as
// even samples 104, 103, 46, 97 and odd samples 105, 104, 119, 118, one
// pair per clock starting the cycle after load, so an 8-sample frame takes
// 4 clocks. Random frames then follow back to back (load in the last-pair
// cycle) and with gaps; every pair, ready and the first/last markers are
// checked against the frame contents.
module even_odd_split_tb;
  localparam int XW = dwt_pkg::XW, N = dwt_pkg::FRAME, NP = N / 2;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                 load = 0, ready, out_valid, frame_first, frame_last;
  logic [N-1:0][XW-1:0] frame = '0;
  logic [XW-1:0]        x_even, x_odd;

  even_odd_split dut (.clk, .rst, .load, .frame, .ready, .out_valid, .frame_first,
                      .frame_last, .x_even, .x_odd);

  int ev_q[$], od_q[$], pos_q[$];
  int load_cycle[$];
  int npairs = 0, nb2b = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      int e, o, p;
      checks++;
      if (ev_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected pair");
      end else begin
        e = ev_q.pop_front(); o = od_q.pop_front(); p = pos_q.pop_front();
        if (int'(x_even) != e || int'(x_odd) != o || frame_first != (p == 0) ||
            frame_last != (p == NP - 1) || ready != (p == NP - 1)) begin
          failures++;
          $display("FAIL pair %0d: even=%0d odd=%0d first=%b last=%b ready=%b expected %0d %0d",
                   p, x_even, x_odd, frame_first, frame_last, ready, e, o);
        end
        if (p == 0) begin
          checks++;
          if (cycle - load_cycle.pop_front() != 1) begin
            failures++;
            $display("FAIL first pair not one cycle after load");
          end
        end
      end
      npairs++;
    end else if (!rst) begin
      checks++;
      if (!ready) begin
        failures++;
        $display("FAIL not ready while idle");
      end
    end
  end

  task automatic put(input logic [N-1:0][XW-1:0] f);
    // wait until the splitter can take a frame
    @(negedge clk);
    while (!ready) @(negedge clk);
    if (out_valid) nb2b++;
    load  = 1;
    frame = f;
    load_cycle.push_back(cycle);
    for (int i = 0; i < NP; i++) begin
      ev_q.push_back(int'(f[2*i]));
      od_q.push_back(int'(f[2*i+1]));
      pos_q.push_back(i);
    end
    @(negedge clk);
    load = 0;
  endtask

  initial begin
    logic [N-1:0][XW-1:0] f;
    int ref_in[8] = '{104, 105, 103, 104, 46, 119, 97, 118};
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < N; i++) f[i] = XW'(ref_in[i % 8]);
    put(f);
    for (int k = 0; k < 60; k++) begin
      for (int i = 0; i < N; i++) f[i] = XW'($urandom);
      if (k % 4 == 3) repeat ($urandom_range(0, 3)) @(negedge clk);
      // back to back: load again in the cycle of the last pair
      if (k % 4 != 3) begin
        @(negedge clk);
        while (!(ready && out_valid)) @(negedge clk);
        if (out_valid) nb2b++;
        load = 1;
        frame = f;
        load_cycle.push_back(cycle);
        for (int i = 0; i < NP; i++) begin
          ev_q.push_back(int'(f[2*i]));
          od_q.push_back(int'(f[2*i+1]));
          pos_q.push_back(i);
        end
        @(negedge clk);
        load = 0;
      end else
        put(f);
    end
    repeat (NP + 3) @(posedge clk);
    checks++;
    if (ev_q.size() != 0 || npairs != 61 * NP || nb2b == 0) begin
      failures++;
      $display("FAIL %0d pairs left, %0d seen, %0d back-to-back loads", ev_q.size(), npairs, nb2b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
