// tb_features_ram: loads a random 256-feature pixel as 64 beats of four
// features, then reads random feature indices on all six ports at once and
// compares each with the feature that was sent.
module tb_features_ram;
  localparam int NF = 256, NP = 6;
  logic clk = 0;
  logic we;
  logic [5:0] wbeat;
  logic [63:0] wdata;
  logic [7:0] raddr [NP];
  logic [15:0] rdata [NP];
  logic [15:0] ref_f [NF];
  int checks = 0, failures = 0;

  features_ram #(.NUM_FEATURES(NF), .NUM_PORTS(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wbeat = 0; wdata = 0;
    foreach (raddr[p]) raddr[p] = 0;
    foreach (ref_f[i]) ref_f[i] = 16'($urandom);
    for (int b = 0; b < NF/4; b++) begin
      @(negedge clk);
      we = 1; wbeat = 6'(b);
      wdata = {ref_f[4*b+3], ref_f[4*b+2], ref_f[4*b+1], ref_f[4*b]};
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 500; t++) begin
      foreach (raddr[p]) raddr[p] = 8'($urandom);
      #1;
      foreach (raddr[p]) begin
        checks++;
        if (rdata[p] !== ref_f[raddr[p]]) begin
          failures++;
          if (failures < 10) $display("port %0d idx %0d got %h want %h", p, raddr[p], rdata[p], ref_f[raddr[p]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
