// tb_stride_detector: self-checking test of the reference prediction table.
//
// A directed sequence trains one load with a constant 8-byte stride and
// checks that the confidence reaches 3 only after three matching strides,
// then that a broken stride lowers it again. A random phase trains many PCs
// (aliasing included) and compares every lookup with a reference model kept
// in the testbench: confidence up on a repeated stride, down otherwise, the
// stride replaced at confidence 0 or 1. Terminator writes are checked too.
module tb_stride_detector;
  import vr_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              train_valid = 0, term_we = 0;
  logic [PC_W-1:0]   train_pc = '0, lookup_pc = '0, term_pc = '0, term_value = '0;
  logic [ADDR_W-1:0] train_addr = '0;
  logic              lookup_striding;
  logic [ADDR_W-1:0] lookup_addr;
  logic [STRIDE_W-1:0] lookup_stride;
  logic [PC_W-1:0]   lookup_term;

  stride_detector dut (.*);

  int checks = 0, failures = 0;
  // reference model
  logic [ADDR_W-1:0]   m_addr [N];
  logic [STRIDE_W-1:0] m_str  [N];
  int                  m_conf [N];
  logic [PC_W-1:0]     m_term [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic train(input logic [PC_W-1:0] pc, input logic [ADDR_W-1:0] a);
    int i; longint d;
    i = int'(pc[4:0]);
    d = longint'(a) - longint'(m_addr[i]);
    if (d >= -32768 && d <= 32767 && STRIDE_W'(d) == m_str[i]) begin
      if (m_conf[i] < 3) m_conf[i]++;
    end else begin
      if (m_conf[i] <= 1) m_str[i] = STRIDE_W'(d);
      if (m_conf[i] > 0) m_conf[i]--;
    end
    m_addr[i] = a;
    train_valid <= 1; train_pc <= pc; train_addr <= a;
    @(posedge clk); train_valid <= 0; #1;
  endtask

  task automatic look(input logic [PC_W-1:0] pc);
    int i;
    i = int'(pc[4:0]);
    lookup_pc = pc; #1;
    check(lookup_striding == (m_conf[i] == 3), $sformatf("striding pc=%0h", pc));
    check(lookup_addr == m_addr[i], $sformatf("addr pc=%0h", pc));
    check(lookup_stride == m_str[i], $sformatf("stride pc=%0h", pc));
    check(lookup_term == m_term[i], $sformatf("term pc=%0h", pc));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin m_addr[i] = 0; m_str[i] = 0; m_conf[i] = 0; m_term[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk); #1;
    // directed: constant stride 8 from address 0x1000
    for (int k = 0; k < 5; k++) begin
      train(48'h400_0003, 48'h1000 + 8 * k);
      lookup_pc = 48'h400_0003; #1;
      check(lookup_striding == (k >= 4), $sformatf("directed conf after %0d", k));
    end
    check(lookup_stride == 16'd8 && lookup_addr == 48'h1020, "directed stride/addr");
    train(48'h400_0003, 48'h5000);       // broken stride: conf 3 -> 2
    lookup_pc = 48'h400_0003; #1;
    check(!lookup_striding && lookup_stride == 16'd8, "broken stride keeps stride");
    // terminator
    term_we <= 1; term_pc <= 48'h400_0003; term_value <= 48'h400_0077;
    m_term[3] = 48'h400_0077;
    @(posedge clk); term_we <= 0; #1;
    look(48'h400_0003);
    // random training over several PCs, strided and random addresses
    for (int n = 0; n < 3000; n++) begin
      logic [PC_W-1:0] pc;
      pc = 48'h400_0000 + PC_W'($urandom_range(0, 47));
      if ($urandom_range(0, 3) != 0)
        train(pc, m_addr[pc[4:0]] + ADDR_W'(pc[4:0]) * 4 + 4);
      else
        train(pc, ADDR_W'({$urandom, $urandom}));
      if ($urandom_range(0, 15) == 0) begin
        term_we <= 1; term_pc <= pc; term_value <= PC_W'($urandom);
        @(posedge clk); #1; term_we <= 0;
        m_term[pc[4:0]] = term_value;
      end
      look(48'h400_0000 + PC_W'($urandom_range(0, 31)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
