// Testbench of service_window: a slow tick stands in for SWCLK. Windows
// get zero, one or several services at random; the outcome and timing of
// every window closure is compared with a model that counts ticks and
// services per window. The window period is also measured directly.
module tb_service_window;
  import wdt_pkg::*;

  logic             sysclk = 1'b0;
  logic             rst_n  = 1'b0;
  logic             clr    = 1'b1;
  logic             tick;
  logic [LEN_W-1:0] swlen  = 16'd3;
  logic             srvc   = 1'b0;
  logic             sw_closed;
  sw_result_e       sw_result;

  int checks = 0, failures = 0;
  int n_ok = 0, n_lapse = 0, n_multi = 0;
  int m_ticks = 0, m_svc = 0;
  logic m_closed;
  sw_result_e m_res;
  int cyc = 0, last_close = -1, period = 0;
  int tick_div = 4;

  service_window dut (.*);

  always #5 sysclk = ~sysclk;

  // Tick generator: one cycle in tick_div, phase reset by clr.
  int tcount = 0;
  always @(posedge sysclk) begin
    if (clr) tcount <= 0; else tcount <= (tcount == tick_div - 1) ? 0 : tcount + 1;
  end
  assign tick = !clr && (tcount == tick_div - 1);

  always @(posedge sysclk) begin
    int len, s;
    cyc <= cyc + 1;
    len = (swlen == 0) ? 1 : int'(swlen);
    if (!rst_n || clr) begin
      m_ticks <= 0; m_svc <= 0;
    end else begin
      s = m_svc + (srvc ? 1 : 0);
      if (tick && m_ticks + 1 == len) begin
        m_ticks  <= 0; m_svc <= 0;
      end else begin
        m_ticks <= m_ticks + (tick ? 1 : 0);
        m_svc   <= s;
      end
    end
  end

  // Closure and outcome expected in the cycle of the closing tick.
  always_comb begin
    int s;
    s = m_svc + (srvc ? 1 : 0);
    m_closed = rst_n && !clr && tick && (m_ticks + 1 == ((swlen == 0) ? 1 : int'(swlen)));
    m_res    = (s == 0) ? SW_LAPSE : (s == 1) ? SW_OK : SW_MULTI;
  end

  always @(negedge sysclk) if (rst_n) begin
    checks++;
    if (sw_closed !== m_closed) begin
      failures++; $display("FAIL sw_closed=%0b expected %0b at cycle %0d", sw_closed, m_closed, cyc);
    end
    if (m_closed) begin
      checks++;
      if (sw_result !== m_res) begin
        failures++; $display("FAIL sw_result=%s expected %s", sw_result.name(), m_res.name());
      end
      case (m_res)
        SW_OK:    n_ok++;
        SW_LAPSE: n_lapse++;
        default:  n_multi++;
      endcase
    end
    if (sw_closed) begin
      if (last_close >= 0) period = cyc - last_close;
      last_close = cyc;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge sysclk);
    rst_n = 1'b1;
    repeat (2) @(negedge sysclk);
    clr = 1'b0;
    // Window of 3 ticks of 4 cycles: closures every 12 cycles.
    repeat (100) begin
      srvc = ($urandom_range(0, 7) == 0);
      @(negedge sysclk);
    end
    srvc = 0;
    checks++;
    if (period != 12) begin failures++; $display("FAIL window period %0d, expected 12", period); end
    // Random lengths, tick rates and service patterns, with restarts.
    for (int seg = 0; seg < 40; seg++) begin
      clr = 1'b1;
      swlen = 16'($urandom_range(0, 6));
      tick_div = $urandom_range(1, 5);
      @(negedge sysclk);
      clr = 1'b0;
      repeat (300) begin
        srvc = ($urandom_range(0, 3 * tick_div * (int'(swlen) + 1)) == 0);
        @(negedge sysclk);
      end
      srvc = 0;
    end
    checks++;
    if (n_ok == 0 || n_lapse == 0 || n_multi == 0) begin
      failures++; $display("FAIL outcome not covered: ok=%0d lapse=%0d multi=%0d", n_ok, n_lapse, n_multi);
    end
    $display("windows: ok=%0d lapse=%0d multi=%0d", n_ok, n_lapse, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
