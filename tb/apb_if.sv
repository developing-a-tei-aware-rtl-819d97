// apb_if: APB bus bundle with a simple master (bus functional model) for the
// testbenches. write() and read() each perform one transfer: a setup cycle
// with PSEL, then access cycles with PENABLE until PREADY; they return the
// slave's PSLVERR. Signals change on the falling clock edge.
interface apb_if (input logic clk);
  logic        psel    = 1'b0;
  logic        penable = 1'b0;
  logic        pwrite  = 1'b0;
  logic [11:0] paddr   = '0;
  logic [31:0] pwdata  = '0;
  logic [31:0] prdata;
  logic        pready;
  logic        pslverr;

  task automatic write(input logic [11:0] addr, input logic [31:0] data, output logic err);
    @(negedge clk);
    psel = 1'b1; penable = 1'b0; pwrite = 1'b1; paddr = addr; pwdata = data;
    @(negedge clk);
    penable = 1'b1;
    #1;
    while (!pready) begin @(negedge clk); #1; end
    err = pslverr;
    @(posedge clk);
    #1;
    psel = 1'b0; penable = 1'b0; pwrite = 1'b0;
  endtask

  task automatic read(input logic [11:0] addr, output logic [31:0] data, output logic err);
    @(negedge clk);
    psel = 1'b1; penable = 1'b0; pwrite = 1'b0; paddr = addr;
    @(negedge clk);
    penable = 1'b1;
    #1;
    while (!pready) begin @(negedge clk); #1; end
    data = prdata;
    err  = pslverr;
    @(posedge clk);
    #1;
    psel = 1'b0; penable = 1'b0;
  endtask
endinterface
