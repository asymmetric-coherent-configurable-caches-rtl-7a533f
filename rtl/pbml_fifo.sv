// pbml_fifo: one PolyBlaze Memory Link (PBML), a dual-clock FIFO.
//
// Every connection in the PolyBlaze memory system (cache <-> L1 Arbiter,
// L1 Arbiter <-> L2 Arbiter, L2 Arbiter <-> memory interface) is such a link.
// Because each link crosses between two independent clocks, the modules on
// either side can run at different rates (for example cores at 80 MHz and the
// memory interface at 160 MHz). The document says the links are asynchronous
// or synchronous FIFOs of various widths and depths; this design always uses
// the asynchronous form, which also works when both clocks are the same.
//
// How it works: binary read and write pointers one bit wider than the address
// are kept in their own domains and published as Gray code; each side brings
// the other's Gray pointer over through SYNC_STAGES flip-flops. Full and empty
// are computed from the synchronised pointers, so they are conservative.
// Storage is a register array with an asynchronous read: the read side is
// show-ahead (rd_data is the head entry whenever rd_empty is low).
//
// Interface: wr_en pushes wr_data when wr_full is low; rd_en pops the head when
// rd_empty is low. Pushing into a full or popping from an empty FIFO is ignored.
// Timing: with equal clocks an entry written at edge k becomes visible to the
// reader (rd_empty low) after edge k+SYNC_STAGES. rst_n is asynchronous and
// must be applied to both domains together.
// Depth (16) and synchroniser length (2) are this design's choices.
module pbml_fifo #(
  parameter int unsigned WIDTH       = 32,
  parameter int unsigned DEPTH_LOG2  = 4,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic             rst_n,
  // write side
  input  logic             wr_clk,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             wr_full,
  // read side
  input  logic             rd_clk,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty
);
  localparam int unsigned DEPTH = 1 << DEPTH_LOG2;
  localparam int unsigned PW    = DEPTH_LOG2 + 1;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [PW-1:0] wbin, wgray, rbin, rgray;
  logic [PW-1:0] wgray_sync [SYNC_STAGES];   // write pointer seen by the reader
  logic [PW-1:0] rgray_sync [SYNC_STAGES];   // read pointer seen by the writer

  function automatic logic [PW-1:0] bin2gray(input logic [PW-1:0] b);
    return b ^ (b >> 1);
  endfunction

  // ------------------------------------------------------------- write domain
  logic [PW-1:0] wbin_next;
  assign wbin_next = wbin + PW'(1);
  // Full when the write pointer has wrapped once more than the read pointer:
  // Gray codes differ in the two top bits and agree in the rest.
  assign wr_full = (wgray == (rgray_sync[SYNC_STAGES-1] ^ {2'b11, {(PW-2){1'b0}}}));

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[DEPTH_LOG2-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge rst_n) begin
    if (!rst_n) begin
      wbin  <= '0;
      wgray <= '0;
      for (int i = 0; i < SYNC_STAGES; i++) rgray_sync[i] <= '0;
    end else begin
      if (wr_en && !wr_full) begin
        wbin  <= wbin_next;
        wgray <= bin2gray(wbin_next);
      end
      rgray_sync[0] <= rgray;
      for (int i = 1; i < SYNC_STAGES; i++) rgray_sync[i] <= rgray_sync[i-1];
    end
  end

  // -------------------------------------------------------------- read domain
  logic [PW-1:0] rbin_next;
  assign rbin_next = rbin + PW'(1);
  assign rd_empty  = (rgray == wgray_sync[SYNC_STAGES-1]);
  assign rd_data   = mem[rbin[DEPTH_LOG2-1:0]];

  always_ff @(posedge rd_clk or negedge rst_n) begin
    if (!rst_n) begin
      rbin  <= '0;
      rgray <= '0;
      for (int i = 0; i < SYNC_STAGES; i++) wgray_sync[i] <= '0;
    end else begin
      if (rd_en && !rd_empty) begin
        rbin  <= rbin_next;
        rgray <= bin2gray(rbin_next);
      end
      wgray_sync[0] <= wgray;
      for (int i = 1; i < SYNC_STAGES; i++) wgray_sync[i] <= wgray_sync[i-1];
    end
  end

endmodule
