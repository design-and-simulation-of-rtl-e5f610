// tb_frame_mem: frame memory with four write and four read ports.
// Fills the 64 words through the write ports (four per clock, with random enables),
// reads them all back through the read ports against a shadow array, and checks the
// full flag and direction tag: reset value, fill, drain, fill winning over drain.
module tb_frame_mem;
  import fft_pkg::*;

  localparam int W = 17;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]          we;
  logic [5:0]          waddr [4], raddr [4];
  logic signed [W-1:0] wre [4], wim [4], rre [4], rim [4];
  logic                fill, drain, full;
  dir_e                dir_in, dir_out;
  int checks = 0, failures = 0;
  int shadow_re [64], shadow_im [64];

  frame_mem #(.W(W), .N(64), .NRD(4), .NWR(4)) dut (
    .clk, .rst_n, .we_i(we), .waddr_i(waddr), .wre_i(wre), .wim_i(wim),
    .raddr_i(raddr), .rre_o(rre), .rim_o(rim),
    .fill_i(fill), .dir_i(dir_in), .drain_i(drain), .full_o(full), .dir_o(dir_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; fill = 0; drain = 0; dir_in = DIR_FWD;
    for (int p = 0; p < 4; p++) begin waddr[p] = '0; raddr[p] = '0; wre[p] = '0; wim[p] = '0; end
    @(negedge clk);
    check(!full && dir_out == DIR_FWD, "reset state");
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      // write all 64 words, four addresses per clock, some ports idle some clocks
      for (int j = 0; j < 16; ) begin
        @(negedge clk);
        we = 4'($urandom_range(15));
        if (round == 0 || j == 15) we = 4'hF;
        for (int p = 0; p < 4; p++) begin
          waddr[p] = 6'(4 * j + p);
          wre[p] = W'(int'($urandom) % 65536);
          wim[p] = W'(int'($urandom) % 65536);
          if (we[p]) begin
            shadow_re[4 * j + p] = int'(wre[p]);
            shadow_im[4 * j + p] = int'(wim[p]);
          end
        end
        if (we == 4'hF) j++;
      end
      @(negedge clk);
      we = '0;
      fill = 1; dir_in = dir_e'(round % 2);
      @(negedge clk);
      fill = 0;
      check(full && dir_out == dir_e'(round % 2), "fill sets full and tag");
      // read back in a scrambled order through all four ports
      for (int j = 0; j < 16; j++) begin
        for (int p = 0; p < 4; p++) raddr[p] = 6'(((j * 4 + p) * 37) % 64);
        #1;
        for (int p = 0; p < 4; p++)
          check(int'(rre[p]) == shadow_re[raddr[p]] && int'(rim[p]) == shadow_im[raddr[p]],
                $sformatf("word %0d read (%0d,%0d) expected (%0d,%0d)", raddr[p], rre[p], rim[p],
                          shadow_re[raddr[p]], shadow_im[raddr[p]]));
      end
      @(negedge clk);
      if (round == 2) begin
        drain = 1; fill = 1;
        @(negedge clk);
        check(full, "fill must win over drain");
        fill = 0;
      end
      drain = 1;
      @(negedge clk);
      drain = 0;
      check(!full, "drain clears full");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
