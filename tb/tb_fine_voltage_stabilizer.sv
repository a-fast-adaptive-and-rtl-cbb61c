`timescale 1ps/1ps
// tb_fine_voltage_stabilizer: checks the fine loop against an independent
// model of its flow chart. First a directed run (a long stable UP_DN must
// give steps 1, 2, 4, 8, 8; a toggling UP_DN steps of 1; Lock low must hold
// the count and restart the sequence), then 4000 cycles of random UP_DN and
// Lock. Every cycle the count, the step and the thermometer gate vector are
// compared with the model.
module tb_fine_voltage_stabilizer;
  localparam int N = 128;
  logic clk = 1'b0, rst = 1'b1, up_dn = 1'b0, lock = 1'b0;
  logic [N-1:0] f_sw;
  logic [7:0]   n_on, step;
  int checks = 0, failures = 0;
  bit done = 1'b0;

  // model state
  int m_on, m_k, m_step;
  bit m_prev, m_have;

  fine_voltage_stabilizer dut (.*);

  always #5000 clk = ~clk;

  task automatic model_tick(input bit u, input bit l);
    int s;
    if (!l) begin
      m_k = 0; m_have = 0; m_step = 0;
    end else begin
      if (m_have && (u == m_prev)) begin
        s = 1 << m_k;
        if (m_k < 3) m_k++;
      end else begin
        s = 1; m_k = 0;
      end
      m_step = s;
      if (!u) m_on = (m_on + s > N) ? N : m_on + s;
      else    m_on = (m_on < s) ? 0 : m_on - s;
      m_prev = u; m_have = 1;
    end
  endtask

  task automatic compare();
    logic [N-1:0] exp_sw;
    for (int i = 0; i < N; i++) exp_sw[i] = (i < m_on) ? 1'b0 : 1'b1;
    checks++;
    if (int'(n_on) != m_on || int'(step) != m_step || f_sw != exp_sw) begin
      failures++;
      $display("FAIL t=%0t n_on=%0d/%0d step=%0d/%0d", $time, n_on, m_on, step, m_step);
    end
  endtask

  // one clock with given inputs, then compare
  task automatic cycle(input bit u, input bit l);
    @(negedge clk);
    up_dn = u; lock = l;
    @(posedge clk);
    model_tick(u, l);
    #1;
    compare();
  endtask

  int seq [5] = '{1, 2, 4, 8, 8};

  initial begin
    m_on = 0; m_k = 0; m_step = 0; m_prev = 0; m_have = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    #1 compare();
    // Directed: UP_DN low and stable -> 1 (first sample), 1, 2, 4, 8, 8
    cycle(1'b0, 1'b1);
    checks++; if (step != 8'd1) begin failures++; $display("FAIL first step %0d", step); end
    for (int i = 0; i < 5; i++) begin
      cycle(1'b0, 1'b1);
      checks++;
      if (int'(step) != seq[i]) begin failures++; $display("FAIL binary step %0d: %0d", i, step); end
    end
    // Toggling UP_DN -> steps of one
    for (int i = 0; i < 6; i++) begin
      cycle(~i[0], 1'b1);
      checks++;
      if (step != 8'd1) begin failures++; $display("FAIL toggle step %0d", step); end
    end
    // Lock low holds the count
    begin
      logic [7:0] held;
      held = n_on;
      repeat (5) cycle(1'b0, 1'b0);
      checks++;
      if (n_on != held) begin failures++; $display("FAIL hold"); end
    end
    // Saturation at the top
    repeat (40) cycle(1'b0, 1'b1);
    checks++; if (n_on != 8'(N)) begin failures++; $display("FAIL top saturation %0d", n_on); end
    // Random
    repeat (4000) cycle(1'($urandom_range(0, 3) == 0 ? ~up_dn : up_dn), 1'($urandom_range(0, 9) != 0));
    // Saturation at the bottom
    repeat (40) cycle(1'b1, 1'b1);
    checks++; if (n_on != 8'd0) begin failures++; $display("FAIL bottom saturation %0d", n_on); end
    done = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    if (!done) begin
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
