// tb_bsw_ffc: unit test of the Binary Scheduling Wheels fast-forward counter.
// (1) The worked example of the algorithm: counter 0011, non-empty wheels
//     1011 (wheel 2 empty): the next pass adds carry-in 0001, giving 0100,
//     changing bits 0111, and serves wheel 0 then wheel 1; the passes after
//     that serve {0}, {0,1}, {0}, {0,1,3}.
// (2) Random non-empty masks changing between requests, against a model of
//     the algorithm (a pass serves, lowest first, every non-empty wheel whose
//     counter bit changed; the counter advances by the lowest non-empty bit).
// (3) All of wheels 0..5 non-empty: wheel i is served 2**-i as often as wheel 0.
module tb_bsw_ffc;
  localparam int W = 32, WI = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0] mask = '0, counter;
  logic nxt = 0, valid, pass_start;
  logic [WI-1:0] wheel;

  bsw_ffc #(.W(W)) dut (.clk, .rst_n, .mask, .nxt, .wheel, .valid, .pass_start, .counter);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  logic [W-1:0] m_cnt = '0, m_cur = '0;

  function automatic logic [W-1:0] lsb1(input logic [W-1:0] v);
    return v & (~v + 1'b1);
  endfunction

  // one request: compare the served wheel with the model
  task automatic req(input string tag, output int got);
    logic [W-1:0] pick;
    bit start;
    // with every wheel empty a request does nothing
    start = (m_cur & mask) == '0;
    if (mask == '0) ;
    else if (start) begin
      logic [W-1:0] prev;
      prev  = m_cnt;
      m_cnt = m_cnt + lsb1(mask);
      m_cur = mask & (prev ^ m_cnt);
    end else m_cur = m_cur & mask;
    pick = (mask == '0) ? '0 : lsb1(m_cur);
    m_cur = m_cur & ~pick;
    @(negedge clk);
    nxt = 1;
    #1;
    check(valid == (mask != '0), {tag, ": valid"});
    got = int'(wheel);
    if (mask != '0) begin
      check(pick[wheel] && pass_start == start,
            $sformatf("%s: wheel %0d pass_start %b, expected %b %b", tag, wheel, pass_start, pick, start));
    end
    @(negedge clk);
    nxt = 0;
    if (mask != '0) check(counter == m_cnt, $sformatf("%s: counter %h expected %h", tag, counter, m_cnt));
  endtask

  int served [W];
  int w;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // (1) reach counter 0011 with only wheel 0 non-empty
    mask = 32'b0001;
    repeat (3) req("setup", w);
    check(counter == 32'b0011, "counter 0011");
    mask = 32'b1011;
    begin
      static int exp_w [9] = '{0, 1, 0, 0, 1, 0, 0, 1, 3};
      for (int i = 0; i < 9; i++) begin
        req("example", w);
        check(w == exp_w[i], $sformatf("example step %0d: wheel %0d expected %0d",
              i, w, exp_w[i]));
      end
      check(counter == 32'b1000, $sformatf("example: counter %b", counter));
    end
    // (2) random masks
    for (int i = 0; i < 20000; i++) begin
      if ($urandom % 4 == 0) mask = ($urandom % 8 == 0) ? '0 : ($urandom & $urandom);
      req("random", w);
    end
    // (3) rates
    for (int i = 0; i < W; i++) served[i] = 0;
    mask = 32'h3F;
    for (int i = 0; i < 6300; i++) begin
      req("rates", w);
      served[w]++;
    end
    for (int i = 1; i < 6; i++)
      check(served[i] * (1 << i) >= served[0] - (1 << i) && served[i] * (1 << i) <= served[0] + (1 << i),
            $sformatf("wheel %0d served %0d times, wheel 0 %0d", i, served[i], served[0]));
    $display("served: %0d %0d %0d %0d %0d %0d", served[0], served[1], served[2], served[3], served[4], served[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
