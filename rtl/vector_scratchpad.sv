// vector_scratchpad: on-chip store of the source-vector segment x^k.
//
// Step 1 reads x[col] for every matrix nonzero, so the store serves P random
// reads per cycle. Words are interleaved over NBANKS single-read banks
// (bank = address mod NBANKS). When several lanes address the same bank in a
// cycle, the lowest-numbered lane is granted and the others see req_grant low
// and retry: this is the bank-conflict stall. Read data appear in rd_data one
// cycle after the grant, with rd_valid. A separate write port stores WRW
// consecutive words per cycle starting at wr_addr (a multiple of WRW); with
// WRW <= NBANKS those words lie in different banks.
//
// The capacity, SEG_WORDS = 2M single-precision words (8 MB), is the vector
// storage the document gives for its ASIC. With its_mode = 1 (iteration
// overlap) the same storage is two buffers of SEG_WORDS/2 words: step 1
// reads buffer rd_sel while the resultant vector of the running iteration is
// written into the other one; read addresses are then offsets within the
// buffer. Word interleaving, the lowest-lane-first arbitration, the separate
// write port, its width and P = 16 are this design's choices; the document says only
// that the scratchpad has many banks so conflicts are rare.
module vector_scratchpad #(
  parameter int unsigned P         = 16,
  parameter int unsigned NBANKS    = 32,
  parameter int unsigned SEG_WORDS = 2097152,
  parameter int unsigned WRW       = 16,
  localparam int unsigned AW = $clog2(SEG_WORDS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  its_mode,
  input  logic                  rd_sel,
  // load port (physical word address)
  input  logic                  wr_en,
  input  logic [AW-1:0]         wr_addr,
  input  logic [WRW-1:0][31:0]  wr_data,
  // P read ports (segment-relative address)
  input  logic [P-1:0]          req_valid,
  input  logic [P-1:0][AW-1:0]  req_addr,
  output logic [P-1:0]          req_grant,
  output logic [P-1:0]          rd_valid,
  output logic [P-1:0][31:0]    rd_data,      // valid with rd_valid
  output logic                  conflict      // some lane was refused this cycle
);
  localparam int unsigned BW    = $clog2(NBANKS);
  localparam int unsigned BANKD = SEG_WORDS / NBANKS;

  logic [P-1:0][AW-1:0] phys;
  logic [P-1:0][BW-1:0] bank, bank_q;
  logic [NBANKS-1:0][31:0] bq;       // registered read word of each bank

  always_comb begin
    for (int l = 0; l < P; l++) begin
      phys[l] = its_mode ? {rd_sel, req_addr[l][AW-2:0]} : req_addr[l];
      bank[l] = phys[l][BW-1:0];
    end
    for (int l = 0; l < P; l++) begin
      req_grant[l] = req_valid[l];
      for (int o = 0; o < l; o++)
        if (req_valid[o] && bank[o] == bank[l]) req_grant[l] = 1'b0;
    end
    conflict = (req_grant != req_valid);
  end

  // one single-port-read, single-port-write array per bank
  for (genvar b = 0; b < int'(NBANKS); b++) begin : g_bank
    logic [31:0]          bmem [BANKD];
    logic                 re, we;
    logic [AW-BW-1:0]     ra, wa;
    logic [BW-1:0]        j;          // which of the WRW written words falls in this bank

    always_comb begin
      re = 1'b0;
      ra = '0;
      for (int l = int'(P) - 1; l >= 0; l--)
        if (req_grant[l] && bank[l] == BW'(b)) begin
          re = 1'b1;
          ra = phys[l][AW-1:BW];
        end
      j  = BW'(b) - wr_addr[BW-1:0];
      we = wr_en && (32'(j) < WRW);
      wa = (AW-BW)'((wr_addr + AW'(j)) >> BW);
    end

    always_ff @(posedge clk) begin
      if (we) bmem[wa] <= wr_data[j[$clog2(WRW)-1:0]];
      if (re) bq[b] <= bmem[ra];
    end
  end

  always_comb
    for (int l = 0; l < P; l++) rd_data[l] = bq[bank_q[l]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= '0;
      bank_q   <= '0;
    end else begin
      rd_valid <= req_grant;
      bank_q   <= bank;
    end
  end
endmodule
