// tb_rs_mem_wrapper - the clocked coder memory built on emulator memory.
// Random cycles of write (EZ=0, WZ=0), read (EZ=0, WZ=1) and idle (EZ=1)
// are applied; after each rising edge Q must equal what a synchronous RAM
// gives: the written word on a write, the stored word on a read (one-cycle
// latency), unchanged when idle.
module tb_rs_mem_wrapper;
  localparam int AW = 7, DW = 8;

  logic CLK = 1'b0;
  always #5 CLK = ~CLK;

  logic          EZ, WZ;
  logic [AW-1:0] A;
  logic [DW-1:0] D, Q;

  rs_mem_wrapper #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] model [2**AW];
  logic [DW-1:0] q_exp;
  int n_rd = 0, n_wr = 0, n_idle = 0;

  initial begin
    EZ = 1; WZ = 1; A = '0; D = '0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge CLK); EZ = 0; WZ = 0; A = AW'(a); D = DW'($urandom); model[a] = D;
    end
    @(posedge CLK);
    q_exp = model[2**AW-1];
    for (int i = 0; i < 3000; i++) begin
      @(negedge CLK);
      A = AW'($urandom); D = DW'($urandom);
      case ($urandom % 3)
        0: begin EZ = 0; WZ = 0; model[A] = D; q_exp = D; n_wr++; end
        1: begin EZ = 0; WZ = 1; q_exp = model[A]; n_rd++; end
        default: begin EZ = 1; WZ = $urandom; n_idle++; end
      endcase
      @(posedge CLK); #1;
      checks++;
      if (Q !== q_exp) begin
        failures++;
        $display("FAIL: cycle %0d Q=%h expected %h (EZ=%0b WZ=%0b A=%0d)", i, Q, q_exp, EZ, WZ, A);
      end
    end
    if (n_rd == 0 || n_wr == 0 || n_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge CLK);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
