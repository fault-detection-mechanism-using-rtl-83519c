// Testbench of frame_window: a slow tick stands in for FWCLK and service
// window closures with random outcomes are injected. A model decides when
// a frame lapses and which failure each wdfail pulse must report.
module tb_frame_window;
  import wdt_pkg::*;

  logic             sysclk = 1'b0;
  logic             rst_n  = 1'b0;
  logic             clr    = 1'b1;
  logic             tick;
  logic [LEN_W-1:0] fwlen  = 16'd4;
  logic             sw_closed = 1'b0;
  sw_result_e       sw_result = SW_OK;
  logic             wdfail;
  fail_mode_e       fail_mode;

  int checks = 0, failures = 0;
  int n_fw = 0, n_swl = 0, n_swm = 0;
  int m_ticks = 0, m_cl = 0;
  logic m_fail = 1'b0;
  fail_mode_e m_mode = FM_NONE;
  int tick_div = 3;
  int tcount = 0;
  int close_rate = 20;

  frame_window dut (.*);

  always #5 sysclk = ~sysclk;

  always @(posedge sysclk)
    if (clr) tcount <= 0; else tcount <= (tcount == tick_div - 1) ? 0 : tcount + 1;
  assign tick = !clr && (tcount == tick_div - 1);

  always @(posedge sysclk) begin
    int len, c;
    logic lapse, swf;
    len = (fwlen == 0) ? 1 : int'(fwlen);
    if (!rst_n || clr) begin
      m_ticks <= 0; m_cl <= 0; m_fail <= 0; m_mode <= FM_NONE;
    end else begin
      c     = m_cl + (sw_closed ? 1 : 0);
      lapse = tick && (m_ticks + 1 == len) && (c == 0);
      swf   = sw_closed && sw_result != SW_OK;
      m_fail <= lapse || swf;
      if (swf)        m_mode <= (sw_result == SW_LAPSE) ? FM_SW_LAPSE : FM_SW_MULTI;
      else if (lapse) m_mode <= FM_FW_LAPSE;
      if (tick && m_ticks + 1 == len) begin
        m_ticks <= 0; m_cl <= 0;
      end else begin
        m_ticks <= m_ticks + (tick ? 1 : 0);
        m_cl <= c;
      end
    end
  end

  always @(negedge sysclk) if (rst_n) begin
    checks++;
    if (wdfail !== m_fail) begin
      failures++; $display("FAIL wdfail=%0b expected %0b", wdfail, m_fail);
    end
    checks++;
    if (fail_mode !== m_mode) begin
      failures++; $display("FAIL fail_mode=%s expected %s", fail_mode.name(), m_mode.name());
    end
    if (m_fail) case (m_mode)
      FM_FW_LAPSE: n_fw++;
      FM_SW_LAPSE: n_swl++;
      FM_SW_MULTI: n_swm++;
      default: ;
    endcase
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(int cycles);
    repeat (cycles) begin
      int r;
      r = $urandom_range(0, close_rate);
      sw_closed = (r == 0);
      r = $urandom_range(0, 9);
      sw_result = (r < 7) ? SW_OK : (r < 9) ? SW_LAPSE : SW_MULTI;
      @(negedge sysclk);
    end
    sw_closed = 1'b0;
  endtask

  initial begin
    int first_fail;
    repeat (3) @(negedge sysclk);
    rst_n = 1'b1;
    repeat (2) @(negedge sysclk);
    // No closures at all: first lapse exactly one frame (4 ticks of 3 cycles) after start.
    clr = 1'b0;
    first_fail = 0;
    while (!wdfail && first_fail < 100) begin @(negedge sysclk); first_fail++; end
    checks++;
    if (first_fail != 12 || fail_mode !== FM_FW_LAPSE) begin
      failures++; $display("FAIL first frame lapse after %0d cycles (%s), expected 12", first_fail, fail_mode.name());
    end
    for (int seg = 0; seg < 40; seg++) begin
      clr = 1'b1;
      fwlen = 16'($urandom_range(0, 6));
      tick_div = $urandom_range(1, 4);
      close_rate = $urandom_range(2, 40);
      @(negedge sysclk);
      clr = 1'b0;
      drive(300);
    end
    checks++;
    if (n_fw == 0 || n_swl == 0 || n_swm == 0) begin
      failures++; $display("FAIL failure kinds not covered: fw=%0d swl=%0d swm=%0d", n_fw, n_swl, n_swm);
    end
    $display("failures seen: frame lapse=%0d sw lapse=%0d sw multi=%0d", n_fw, n_swl, n_swm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
