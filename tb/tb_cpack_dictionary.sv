// tb_cpack_dictionary: drives random pushes (none, one or two per cycle)
// and clears into the dictionary and compares, every cycle, the stored
// entries, their valid bits and the forwarded view (contents after word
// 1's push) with a model that pushes one word at a time into a FIFO.
// Runs at the default 16 entries, long enough to wrap the write pointer
// many times.
module tb_cpack_dictionary;
  localparam int N = 16;

  int checks = 0, failures = 0;
  int wraps = 0;

  logic clk = 0, rst_n = 0;
  logic clear, push1, push2;
  logic [31:0] data1, data2;
  logic [31:0] entries [N];
  logic [31:0] fwd     [N];
  logic [N-1:0] valid, fwd_valid;
  logic [3:0]  wr_ptr;

  cpack_dictionary dut (
    .clk, .rst_n, .clear, .push1, .data1, .push2, .data2,
    .entries, .valid, .fwd_entries(fwd), .fwd_valid, .wr_ptr
  );

  always #5 clk = ~clk;

  bit [31:0] m_data [N];
  bit        m_vld  [N];
  int        m_wp;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; push1 = 0; push2 = 0; data1 = 0; data2 = 0;
    for (int i = 0; i < N; i++) begin m_data[i] = 0; m_vld[i] = 0; end
    m_wp = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 49) == 0);
      push1 = $urandom_range(0, 1);
      push2 = $urandom_range(0, 1);
      data1 = $urandom();
      data2 = $urandom();
      #1;
      // stored contents and forwarded view
      check("wr_ptr", wr_ptr, m_wp);
      for (int i = 0; i < N; i++) begin
        check("valid", valid[i], m_vld[i]);
        if (m_vld[i]) check("entry", entries[i], m_data[i]);
        if (push1 && i == m_wp) begin
          check("fwd new", fwd[i], data1);
          check("fwd new valid", fwd_valid[i], 1);
        end else begin
          check("fwd valid", fwd_valid[i], m_vld[i]);
          if (m_vld[i]) check("fwd entry", fwd[i], m_data[i]);
        end
      end
      // model update
      if (clear) begin
        for (int i = 0; i < N; i++) m_vld[i] = 0;
        m_wp = 0;
      end else begin
        if (push1) begin
          m_data[m_wp] = data1; m_vld[m_wp] = 1;
          if (m_wp == N - 1) wraps++;
          m_wp = (m_wp + 1) % N;
        end
        if (push2) begin
          m_data[m_wp] = data2; m_vld[m_wp] = 1;
          if (m_wp == N - 1) wraps++;
          m_wp = (m_wp + 1) % N;
        end
      end
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL write pointer never wrapped");
    end
    $display("pointer wraps: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
