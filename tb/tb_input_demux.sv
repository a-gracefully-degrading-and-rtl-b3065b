// tb_input_demux: flits addressed to each VC a link owns, and to the
// ejection channel, must raise exactly that strobe and carry the flit.
module tb_input_demux;
  import roco_pkg::*;
  logic clk = 0, rst_n = 0;
  link_t lnk;
  logic [NVC-1:0] vc_valid;
  flit_t vc_flit, eject_flit;
  logic eject_valid;
  int checks = 0, failures = 0, ejects = 0;
  int owned[$];

  input_demux #(.ROUTING(RT_ADAPTIVE), .FROM(D_N)) dut (
    .clk, .rst_n, .lnk, .vc_valid, .vc_flit, .eject_valid, .eject_flit);

  always #5 clk = ~clk;

  initial begin
    // VCs fed from the North in the adaptive table: t_yx (1) and d_y (6)
    owned = '{1, 6};
    lnk = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int pick;
      @(negedge clk);
      pick = $urandom % 4;
      lnk.valid = (pick != 3);
      lnk.vcid  = (pick == 2) ? VCID_EJECT : VCID_W'(owned[pick % 2]);
      lnk.flit  = flit_t'({$urandom, $urandom, $urandom, $urandom});
      #1;
      checks++;
      if (!lnk.valid) begin
        if (vc_valid != '0 || eject_valid) begin failures++; $display("FAIL idle"); end
      end else if (pick == 2) begin
        ejects++;
        if (vc_valid != '0 || !eject_valid || eject_flit != lnk.flit) begin failures++; $display("FAIL eject"); end
      end else begin
        if (vc_valid != (NVC'(1) << owned[pick]) || eject_valid || vc_flit != lnk.flit) begin
          failures++; $display("FAIL vc %0d got %b", owned[pick], vc_valid);
        end
      end
    end
    checks++;
    if (ejects == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
