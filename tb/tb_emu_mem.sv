// tb_emu_mem - emulator memory: random writes (wen) and asynchronous reads
// (ren) against a software model; reads with ren low must give zero, and a
// write must not happen while wen is low.
module tb_emu_mem;
  localparam int AW = 8, DW = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          ren, wen;
  logic [AW-1:0] adr;
  logic [DW-1:0] wdata, rdata;

  emu_mem #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] model [2**AW];
  bit            valid [2**AW];

  initial begin
    ren = 0; wen = 0; adr = '0; wdata = '0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); wen = 1; adr = AW'(a); wdata = $urandom; model[a] = wdata; valid[a] = 1;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      adr = AW'($urandom); wdata = $urandom;
      case ($urandom % 3)
        0: begin wen = 1; ren = 0; model[adr] = wdata; end
        1: begin wen = 0; ren = 1; end
        default: begin wen = 0; ren = 0; end
      endcase
      #1;
      checks++;
      if (rdata !== (ren ? model[adr] : '0)) begin
        failures++;
        $display("FAIL: adr %0d ren %0b read %h expected %h", adr, ren, rdata, model[adr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
