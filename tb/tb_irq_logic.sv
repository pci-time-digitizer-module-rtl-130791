// tb_irq_logic: random half-full levels, overflow pulses and clears against a
// cycle-by-cycle model of the sticky flags and the gated interrupt lines.
module tb_irq_logic;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] half_full = 0, overflow = 0, clr_half = 0, clr_ovf = 0;
  logic en_half = 0, en_ovf = 0;
  logic [N-1:0] flag_half, flag_ovf;
  logic irq_half, irq_ovf;
  logic [N-1:0] m_hf, m_ov, m_hd;
  logic m_ih, m_io;
  int checks = 0, failures = 0, n_ih = 0, n_io = 0;
  always #4 clk = ~clk;
  irq_logic dut (.*);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m_hf = 0; m_ov = 0; m_hd = 0; m_ih = 0; m_io = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if ($urandom % 8 == 0) half_full = half_full ^ (N'(1) << ($urandom % N));
      overflow = ($urandom % 10 == 0) ? N'(1) << ($urandom % N) : '0;
      clr_half = ($urandom % 20 == 0) ? N'($urandom) : '0;
      clr_ovf  = ($urandom % 20 == 0) ? N'($urandom) : '0;
      if ($urandom % 50 == 0) en_half = ~en_half;
      if ($urandom % 50 == 0) en_ovf  = ~en_ovf;
      @(posedge clk);
      m_ih = en_half && (m_hf != 0);
      m_io = en_ovf && (m_ov != 0);
      m_hf = (m_hf & ~clr_half) | (half_full & ~m_hd);
      m_ov = (m_ov & ~clr_ovf) | overflow;
      m_hd = half_full;
      #1;
      checks++;
      if (flag_half != m_hf || flag_ovf != m_ov || irq_half != m_ih || irq_ovf != m_io) begin
        failures++; $display("FAIL cycle %0d", i);
      end
      n_ih += irq_half; n_io += irq_ovf;
    end
    checks++; if (n_ih == 0 || n_io == 0) begin failures++; $display("FAIL irq never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
